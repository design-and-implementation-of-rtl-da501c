// RoBA multiplier: rounding-based approximate n x n multiplier (top module).
//
// Each operand is rounded to its nearest power of two, so that the product can
// be formed by shifts and one add/subtract instead of a partial-product array:
//   x*y ~ Xr*y + Yr*x - Xr*Yr
// The error is the dropped term (x-Xr)*(y-Yr); it vanishes when either operand
// is a power of two.
//
// MODE selects one of three architectures around the same unsigned datapath
// (roba_core):
//   S_ROBA  (default) signed: sign detectors -> |x|, |y| (exact negation),
//           unsigned RoBA product, sign set (exact negation) when signs differ.
//   AS_ROBA signed, both negations done as ones' complement (~X, no +1):
//           faster, with an extra error of one unit in each negation.
//   U_ROBA  unsigned: x and y go straight into the datapath; no sign blocks.
// The port names and widths x[7:0], y[7:0], p[15:0] and the default of 8 bits
// follow the design's published RTL symbol. Exact negation is the default
// because its published simulation gives -2 * 11 = -22, which only the exact
// negation reproduces (the ones' complement variant would give -12).
//
// Interface: x, y are N-bit operands (two's complement in the signed modes),
// p the 2N-bit approximate product (two's complement in the signed modes).
// Timing: purely combinational, no clock and no reset; register the ports
// outside if a pipeline is wanted.
module roba
  import roba_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter roba_mode_e  MODE = S_ROBA
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  generate
    if (MODE == U_ROBA) begin : g_unsigned
      roba_core #(.N(N)) u_core (.a(x), .b(y), .p(p));
    end else begin : g_signed
      localparam bit EXACT = (MODE == S_ROBA);
      logic         sx, sy;
      logic [N-1:0] mx, my;
      logic [2*N-1:0] pm;

      roba_sign_detector #(.N(N), .EXACT(EXACT)) u_sd_x (.x(x), .sign(sx), .mag(mx));
      roba_sign_detector #(.N(N), .EXACT(EXACT)) u_sd_y (.x(y), .sign(sy), .mag(my));
      roba_core #(.N(N)) u_core (.a(mx), .b(my), .p(pm));
      roba_sign_set #(.W(2*N), .EXACT(EXACT)) u_ss (.neg(sx ^ sy), .mag(pm), .p(p));
    end
  endgenerate

endmodule

// Unsigned RoBA datapath (the URoBA multiplier).
//
// Approximates the product of two N-bit unsigned numbers by rounding each to the
// nearest power of two, Ar and Br, and using
//   A*B = Ar*B + Br*A - Ar*Br + (A-Ar)*(B-Br)
// with the last, expensive term dropped. Since Ar and Br are powers of two, the
// three remaining products are shifts:
//   rounding x2 : A -> Ar, B -> Br, one-hot, N+1 bits each
//   shifter  x3 : B << log2(Ar), A << log2(Br), Ar << log2(Br)
//   adder/subtractor: sum of the first two minus the third
// The result is exact whenever one operand is a power of two or zero.
//
// Widths: Ar and Br need N+1 bits (11x..x rounds up to 10..0 one bit wider).
// The shifter outputs and the sum are kept at 2N+1 bits, because Ar*Br can
// reach 2^(2N) for unsigned operands. The final result A*B - (A-Ar)*(B-Br) is
// always below 2^(2N), so the top bit of the sum is always zero and is dropped;
// an immediate assertion checks this in simulation.
//
// Purely combinational; the design has no clock.
module roba_core #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,  // unsigned operand
  input  logic [N-1:0]   b,  // unsigned operand
  output logic [2*N-1:0] p   // approximate product
);

  localparam int unsigned RW = N + 1;      // rounded operand width
  localparam int unsigned PW = 2 * N + 1;  // internal product width

  logic [RW-1:0] ar, br;
  logic [PW-1:0] ar_b, br_a, ar_br, sum;

  roba_rounding #(.W(N)) u_round_a (.a(a), .ar(ar));
  roba_rounding #(.W(N)) u_round_b (.a(b), .ar(br));

  roba_shifter #(.DW(N),  .SW(RW), .OW(PW)) u_shift_b  (.d(b),  .onehot(ar), .q(ar_b));
  roba_shifter #(.DW(N),  .SW(RW), .OW(PW)) u_shift_a  (.d(a),  .onehot(br), .q(br_a));
  roba_shifter #(.DW(RW), .SW(RW), .OW(PW)) u_shift_ab (.d(ar), .onehot(br), .q(ar_br));

  roba_addsub #(.W(PW)) u_addsub (.a(ar_b), .b(br_a), .c(ar_br), .s(sum));

  assign p = sum[2*N-1:0];

  // Ar*B + Br*A - Ar*Br = A*B - (A-Ar)*(B-Br) lies in [0, 2^(2N)).
  always_comb begin
    assert (sum[2*N] == 1'b0)
      else $error("RoBA sum out of range: a=%0d b=%0d sum=%0d", a, b, sum);
  end

endmodule

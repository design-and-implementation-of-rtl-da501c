// Shifter of the RoBA multiplier.
//
// Multiplies a DW-bit word d by a power of two given as a one-hot SW-bit word:
// q = d << j where bit j of onehot is set, and q = 0 when onehot is all zeros
// (a zero operand). Because the rounded operands come out of the rounding block
// already one-hot, the shifter is a row of AND gates per shift amount feeding an
// OR tree (a one-hot multiplexer) rather than a logarithmic barrel shifter.
// OW must be at least DW + SW - 1 for no bit to be lost.
//
// Purely combinational.
module roba_shifter #(
  parameter int unsigned DW = 9,
  parameter int unsigned SW = 9,
  parameter int unsigned OW = 17
) (
  input  logic [DW-1:0] d,       // word to shift
  input  logic [SW-1:0] onehot,  // power of two, one-hot or zero
  output logic [OW-1:0] q        // d * onehot
);

  always_comb begin
    q = '0;
    for (int j = 0; j < SW; j++)
      if (onehot[j]) q = q | (OW'(d) << j);
  end

endmodule

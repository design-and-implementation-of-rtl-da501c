// Adder/subtractor of the RoBA multiplier.
//
// Forms the approximate product from the three shifter outputs:
//   s = Ar*B + Br*A - Ar*Br
// all as W-bit unsigned words (W = 2N+1 in the datapath). The result
// equals A*B - (A-Ar)*(B-Br) and is never negative, because each rounding error
// is at most a third of its operand. A plain adder followed by a subtractor is
// used here; the choice of adder structure is left to synthesis.
//
// Purely combinational.
module roba_addsub #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,  // Ar * B
  input  logic [W-1:0] b,  // Br * A
  input  logic [W-1:0] c,  // Ar * Br
  output logic [W-1:0] s   // a + b - c
);

  assign s = a + b - c;

endmodule

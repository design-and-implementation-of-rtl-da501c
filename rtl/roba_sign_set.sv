// Sign set block of the signed RoBA multiplier.
//
// Turns the W-bit unsigned approximate product into the signed result: when the
// two operands had different signs (neg = 1) the magnitude is negated, exactly
// as ~X + 1 (EXACT = 1, S-RoBA) or approximately as ~X (EXACT = 0, AS-RoBA),
// which makes a negative result one too small.
//
// Purely combinational.
module roba_sign_set #(
  parameter int unsigned W     = 16,
  parameter bit          EXACT = 1'b1
) (
  input  logic         neg,  // sign of the result (sign of x XOR sign of y)
  input  logic [W-1:0] mag,  // unsigned product
  output logic [W-1:0] p     // signed product
);

  always_comb begin
    if (!neg)       p = mag;
    else if (EXACT) p = ~mag + W'(1);
    else            p = ~mag;
  end

endmodule

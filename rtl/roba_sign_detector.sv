// Sign detector of the signed RoBA multiplier.
//
// Splits an N-bit two's-complement operand into its sign and an N-bit unsigned
// magnitude, which the unsigned RoBA datapath then multiplies. The sign is the
// top bit. A negative operand is negated either exactly, as ~X + 1 (EXACT = 1,
// S-RoBA), or approximately, as ~X with the increment skipped (EXACT = 0,
// AS-RoBA), which makes the magnitude one too small. The most negative value
// -2^(N-1) has the magnitude 2^(N-1), which still fits in N unsigned bits.
//
// Purely combinational; no clock, no reset.
module roba_sign_detector #(
  parameter int unsigned N     = 8,
  parameter bit          EXACT = 1'b1
) (
  input  logic [N-1:0] x,     // signed operand
  output logic         sign,  // 1: operand is negative
  output logic [N-1:0] mag    // unsigned magnitude
);

  always_comb begin
    sign = x[N-1];
    if (!sign)      mag = x;
    else if (EXACT) mag = ~x + N'(1);
    else            mag = ~x;
  end

endmodule

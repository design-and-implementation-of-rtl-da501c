// Rounding block of the RoBA multiplier.
//
// Rounds a W-bit unsigned magnitude A to the nearest power of two Ar and gives
// Ar as a one-hot word of W+1 bits (all zeros when A is zero). With the leading
// one of A at position k, A is rounded down to 2^k when the next lower bit
// A[k-1] is 0 and up to 2^(k+1) when it is 1. Values of the form 3*2^(k-1) lie
// exactly between the two powers and are rounded up, which is what the bit rule
// gives without any extra logic. The extra output bit is set when the leading
// one is the top bit and the bit below it is also set: Ar[W] = A[W-1] & A[W-2].
//
// Bit rule per output position j (lead[j] = "the leading one of A is at j"):
//   Ar[j] = lead[j] & ~A[j-1]  |  lead[j-1] & A[j-2]
// with bits below position 0 taken as zero.
//
// The one-hot form feeds the shifters directly, so no encoder is needed.
// Purely combinational.
module roba_rounding #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,   // unsigned magnitude
  output logic [W:0]   ar   // nearest power of two, one-hot (zero for a == 0)
);

  logic [W-1:0] lead;       // one-hot position of the leading one of a
  logic [W:0]   lead_x;     // lead_x[j] = lead[j],   lead_x[W] = 0
  logic [W:0]   lead_m1;    // lead_m1[j] = lead[j-1], lead_m1[0] = 0
  logic [W:0]   a_m1;       // a_m1[j]   = a[j-1],     a_m1[0]   = 0
  logic [W+1:0] a_m2;       // a_m2[j]   = a[j-2],     a_m2[1:0] = 0

  // Leading-one detector: a bit is the leading one if no higher bit is set.
  always_comb begin
    logic higher;
    higher = 1'b0;
    for (int j = W - 1; j >= 0; j--) begin
      lead[j] = a[j] & ~higher;
      higher  = higher | a[j];
    end
  end

  assign lead_x  = {1'b0, lead};
  assign lead_m1 = {lead, 1'b0};
  assign a_m1    = {a, 1'b0};
  assign a_m2    = {a, 2'b00};

  always_comb begin
    for (int j = 0; j <= W; j++)
      ar[j] = (lead_x[j] & ~a_m1[j]) | (lead_m1[j] & a_m2[j]);
  end

endmodule

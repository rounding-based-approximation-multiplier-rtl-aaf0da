// roba_round -- rounds an unsigned magnitude to the nearest power of two.
//
// This is the step the RoBA multiplier is named after: the operand A is
// replaced by Ar = 2^e, so that the products Ar*B, Br*A and Ar*Br become
// shifts. Let k be the position of the leading one of mag. The two candidate
// powers are 2^k and 2^(k+1), and their midpoint is 1.5*2^k, which is exactly
// the value with bits k and k-1 set. So mag rounds up to 2^(k+1) when bit k-1
// is set, and down to 2^k when it is clear. A value exactly at the midpoint
// (3*2^(k-1)) is an equal distance from both and is rounded up.
//
// Interface: mag (W bits) in. rounded (W+1 bits, one-hot or 0) is the rounded
// value; it needs one bit more than mag because e.g. 0b11.. rounds to 2^W.
// enc is the exponent e, the shift amount for the shifters. zero flags a zero
// input, for which rounded is 0 and enc is 0. Purely combinational.
//
// Rounding to the nearest power of two follows the design. The midpoint rule,
// the exponent output and the zero flag are this design's own choices.
module roba_round #(
  parameter int unsigned W  = 16,
  localparam int unsigned EW = $clog2(W + 1)
) (
  input  logic [W-1:0]  mag,
  output logic [W:0]    rounded,
  output logic [EW-1:0] enc,
  output logic          zero
);

  logic [EW-1:0] lead;   // position of the leading one
  logic          up;     // bit below the leading one is set

  always_comb begin
    lead = '0;
    up   = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (mag[i]) begin
        lead = EW'(i);
        up   = (i > 0) && mag[i-1];
      end
    end
    zero    = (mag == '0);
    enc     = lead + EW'(up);
    rounded = zero ? '0 : ((W + 1)'(1) << enc);
  end

endmodule

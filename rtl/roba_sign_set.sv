// roba_sign_set -- last stage of the RoBA multiplier: puts the sign back.
//
// The datapath before this block works on magnitudes. When the sign detector
// found the product negative, this block returns the two's complement of the
// magnitude; otherwise it returns the magnitude unchanged. A zero magnitude
// stays zero either way.
//
// Interface: mag (W bits, unsigned) and neg in; p (W bits, two's complement)
// out. Purely combinational.
//
// The block follows the design's block diagram; negating as invert-plus-one
// is this design's own choice.
module roba_sign_set #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] mag,
  input  logic         neg,
  output logic [W-1:0] p
);

  assign p = neg ? (~mag + W'(1)) : mag;

endmodule

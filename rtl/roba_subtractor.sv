// roba_subtractor -- removes the term Ar*Br from the RoBA sum.
//
// The approximate product magnitude is Ar*B + Br*A - Ar*Br. The exact
// product is this plus (A-Ar)*(B-Br), the one term that would need a real
// multiplier and that the RoBA scheme drops. Since |A-Ar| <= A/2 and
// |B-Br| <= B/2, the dropped term is at most a quarter of A*B, so the
// difference computed here is never negative.
//
// Interface: minuend, subtrahend (W bits, unsigned) in; diff (W bits) out.
// Purely combinational.
//
// The subtractor follows the design's block diagram; its width is this
// design's own choice.
module roba_subtractor #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] minuend,
  input  logic [W-1:0] subtrahend,
  output logic [W-1:0] diff
);

  assign diff = minuend - subtrahend;

endmodule

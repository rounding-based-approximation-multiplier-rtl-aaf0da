// roba_adder -- adds the two cross terms of the RoBA product, Ar*B + Br*A.
//
// Interface: x, y (W bits, unsigned) in; sum (W bits) out. The caller sizes W
// so that the sum cannot overflow: in the multiplier each term is below
// 2^(2N), so W = 2N+1 holds the sum. Purely combinational; the adder
// structure is left to synthesis.
//
// The adder follows the design's block diagram; its width is this design's
// own choice.
module roba_adder #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum
);

  assign sum = x + y;

endmodule

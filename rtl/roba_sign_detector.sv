// roba_sign_detector -- first stage of the rounding-based approximate (RoBA)
// multiplier.
//
// The RoBA datapath works on magnitudes. This block takes the two operands in
// two's complement, returns their absolute values, and returns whether the
// product is negative (the XOR of the operand signs). The most negative input,
// -2^(N-1), has magnitude 2^(N-1): it still fits the N-bit unsigned output, so
// no operand is saturated.
//
// With SIGNED = 0 the operands are taken as unsigned. They reach the outputs
// unchanged and prod_neg is 0. This serves the unsigned form of the
// multiplier.
//
// Interface: a, b (N bits) in; a_abs, b_abs (N bits, unsigned) and prod_neg
// out. Purely combinational, no clock.
//
// Taking absolute values of negative inputs follows the design's block
// diagram. Forming them as invert-plus-one is this design's own choice.
module roba_sign_detector #(
  parameter int unsigned N      = 16,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_abs,
  output logic [N-1:0] b_abs,
  output logic         prod_neg
);

  logic a_neg, b_neg;

  always_comb begin
    a_neg    = SIGNED && a[N-1];
    b_neg    = SIGNED && b[N-1];
    a_abs    = a_neg ? (~a + N'(1)) : a;
    b_abs    = b_neg ? (~b + N'(1)) : b;
    prod_neg = a_neg ^ b_neg;
  end

endmodule

// roba_multiplier -- rounding-based approximate (RoBA) multiplier.
//
// Idea: multiplying by a power of two is only a shift. Write Ar and Br for
// the operands rounded to their nearest powers of two. Then exactly
//     A*B = Ar*B + Br*A - Ar*Br + (A-Ar)*(B-Br),
// and the RoBA multiplier drops the last term. What remains needs three
// shifts, one addition and one subtraction, and no partial-product array.
// The dropped term is small because A-Ar and B-Br are each at most half the
// operand; it is zero whenever either operand is a power of two.
//
// Datapath (all combinational):
//   sign detector  -> |A|, |B|, product sign
//   rounding (x2)  -> Ar = 2^ea, Br = 2^eb (exponents ea, eb, zero flags)
//   shifters (x3)  -> Ar*B = |B|<<ea, Br*A = |A|<<eb, Ar*Br = Ar<<eb
//   adder          -> Ar*B + Br*A
//   subtractor     -> minus Ar*Br: the approximate magnitude
//   sign set       -> two's-complement product
//
// Interface: a, b (N bits) in; p (2N bits) out. With SIGNED = 1 (the default)
// operands and product are two's complement; with SIGNED = 0 they are
// unsigned. No clock: p settles one combinational delay after a or b.
//
// The structure, the rounding to powers of two and the formula follow the
// design. The default N = 16 is the 16x16 form; N = 8 gives the 8x8 form.
// The internal widths (products and sums 2N+1 bits wide) and the unsigned
// option as a parameter are this design's own choices.
module roba_multiplier #(
  parameter int unsigned N      = 16,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned EW = $clog2(N + 1);  // exponent width
  localparam int unsigned PW = 2 * N + 1;      // internal product width

  logic [N-1:0]  a_abs, b_abs;
  logic          prod_neg;
  logic [N:0]    a_round;
  logic [EW-1:0] a_enc, b_enc;
  logic          a_zero, b_zero;
  logic [PW-1:0] ar_b, br_a, ar_br;
  logic [PW-1:0] sum, mag;

  roba_sign_detector #(.N(N), .SIGNED(SIGNED)) u_sign (
    .a(a), .b(b), .a_abs(a_abs), .b_abs(b_abs), .prod_neg(prod_neg)
  );

  roba_round #(.W(N)) u_round_a (
    .mag(a_abs), .rounded(a_round), .enc(a_enc), .zero(a_zero)
  );

  // Only the exponent of Br is needed: every product with Br is a shift.
  roba_round #(.W(N)) u_round_b (
    .mag(b_abs), .rounded(), .enc(b_enc), .zero(b_zero)
  );

  // Ar*B: |B| shifted by the exponent of Ar.
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_shift_arb (
    .din(b_abs), .sh(a_enc), .en(!a_zero), .dout(ar_b)
  );

  // Br*A: |A| shifted by the exponent of Br.
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_shift_bra (
    .din(a_abs), .sh(b_enc), .en(!b_zero), .dout(br_a)
  );

  // Ar*Br: the power of two Ar shifted by the exponent of Br. Ar is already
  // 0 when A is zero.
  roba_shifter #(.IW(N + 1), .OW(PW), .SW(EW)) u_shift_arbr (
    .din(a_round), .sh(b_enc), .en(!b_zero), .dout(ar_br)
  );

  roba_adder #(.W(PW)) u_add (
    .x(ar_b), .y(br_a), .sum(sum)
  );

  roba_subtractor #(.W(PW)) u_sub (
    .minuend(sum), .subtrahend(ar_br), .diff(mag)
  );

  // The magnitude is below 2^(2N) (see the widths note in the README), so
  // its top bit is always 0 and is dropped here.
  roba_sign_set #(.W(2 * N)) u_sign_set (
    .mag(mag[2*N-1:0]), .neg(prod_neg), .p(p)
  );

endmodule

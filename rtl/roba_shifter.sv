// roba_shifter -- multiplies a value by a power of two.
//
// The RoBA multiplier needs three products in which one factor is a power of
// two: Ar*B, Br*A and Ar*Br. Each is a left shift of the other factor by the
// exponent of the power of two, so the three multiplications become three of
// these shifters. The shift is a logarithmic barrel shifter: stage s shifts
// by 2^s when bit s of sh is set.
//
// Interface: din (IW bits) is zero-extended to OW bits and shifted left by sh
// (SW bits). en = 0 forces the output to 0; it carries the zero flag of the
// rounder, because a zero operand rounds to 0, which is not a power of two.
// OW must be wide enough for the largest shift; bits moved past OW are lost.
// Purely combinational.
//
// Three shifters follow the design's block diagram. The barrel structure and
// the enable are this design's own choices.
module roba_shifter #(
  parameter int unsigned IW = 16,
  parameter int unsigned OW = 33,
  parameter int unsigned SW = 5
) (
  input  logic [IW-1:0] din,
  input  logic [SW-1:0] sh,
  input  logic          en,
  output logic [OW-1:0] dout
);

  logic [OW-1:0] stage [SW+1];

  always_comb begin
    stage[0] = en ? OW'(din) : '0;
    for (int unsigned s = 0; s < SW; s++) begin
      stage[s+1] = sh[s] ? (stage[s] << (1 << s)) : stage[s];
    end
    dout = stage[SW];
  end

endmodule

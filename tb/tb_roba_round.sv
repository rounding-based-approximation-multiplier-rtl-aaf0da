// tb_roba_round -- exhaustive test of the power-of-two rounder.
//
// Every 16-bit magnitude (the default width) and every 8-bit magnitude goes
// through roba_round. The rounded value is compared with the nearest power of
// two found by distance, the exponent with its log2, and the zero flag with
// the input. Rounding up, rounding down and exact midpoints are counted and
// must each occur.
module tb_roba_round;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0;

  logic [15:0] mag16;
  logic [16:0] r16;
  logic [4:0]  e16;
  logic        z16;
  logic [7:0]  mag8;
  logic [8:0]  r8;
  logic [3:0]  e8;
  logic        z8;

  roba_round dut16 (.mag(mag16), .rounded(r16), .enc(e16), .zero(z16));
  roba_round #(.W(8)) dut8 (.mag(mag8), .rounded(r8), .enc(e8), .zero(z8));

  task automatic check(input string what, input longint got, input longint exp,
                       input longint m);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s mag=%0d got=%0d exp=%0d", what, m, got, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 65536; m++) begin
      longint r;
      mag16 = 16'(m);
      mag8  = 8'(m);
      #1;
      r = nearest_pow2(longint'(m));
      check("rounded16", longint'(r16), longint'(r), longint'(m));
      check("zero16", longint'(z16), longint'(m == 0), longint'(m));
      if (m != 0) check("enc16", longint'(e16), longint'(log2_pow2(r)), longint'(m));
      if (r > longint'(m)) n_up++;
      else if (r < longint'(m)) n_down++;
      if (m > 2 && (r - longint'(m)) == (longint'(m) - r / 2)) n_tie++;
      if (m < 256) begin
        r = nearest_pow2(longint'(m));
        check("rounded8", longint'(r8), longint'(r), longint'(m));
        check("zero8", longint'(z8), longint'(m == 0), longint'(m));
        if (m != 0) check("enc8", longint'(e8), longint'(log2_pow2(r)), longint'(m));
      end
    end
    $display("round up %0d, round down %0d, midpoint %0d", n_up, n_down, n_tie);
    checks++; if (n_up == 0 || n_down == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

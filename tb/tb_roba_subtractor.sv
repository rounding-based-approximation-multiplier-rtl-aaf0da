// tb_roba_subtractor -- test of the 33-bit subtractor with random minuends
// and subtrahends not larger than them, as in the multiplier.
module tb_roba_subtractor;

  int checks = 0, failures = 0;
  logic [32:0] m, s, d;

  roba_subtractor dut (.minuend(m), .subtrahend(s), .diff(d));

  task automatic apply(input longint u, input longint v);
    m = 33'(u); s = 33'(v);
    #1;
    checks++;
    if (longint'(d) != u - v) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h got %h", m, s, d);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(longint'(1) << 32, longint'(1) << 32);
    apply((longint'(1) << 33) - 1, 1);
    repeat (20000) begin
      longint u, v;
      u = (longint'($urandom) << 1) | longint'($urandom) % 2;
      v = longint'($urandom) % (u + 64'sd1);
      apply(u, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

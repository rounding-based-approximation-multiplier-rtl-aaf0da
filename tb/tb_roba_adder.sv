// tb_roba_adder -- test of the 33-bit adder with random operands below 2^32
// (the range of the cross terms in the 16-bit multiplier) and with the
// largest such operands.
module tb_roba_adder;

  int checks = 0, failures = 0;
  logic [32:0] x, y, s;

  roba_adder dut (.x(x), .y(y), .sum(s));

  task automatic apply(input longint u, input longint v);
    x = 33'(u); y = 33'(v);
    #1;
    checks++;
    if (longint'(s) != u + v) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h got %h", x, y, s);
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
    apply(longint'(32'hffff_ffff), longint'(32'hffff_ffff));
    repeat (20000) apply(longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

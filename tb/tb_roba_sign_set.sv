// tb_roba_sign_set -- test of the sign set stage: random 32-bit magnitudes
// with both sign values, plus zero, compared with the negated or unchanged
// value computed as an integer.
module tb_roba_sign_set;

  int checks = 0, failures = 0;
  logic [31:0] mag, p;
  logic        neg;

  roba_sign_set dut (.mag(mag), .neg(neg), .p(p));

  task automatic apply(input logic [31:0] u, input logic n);
    longint exp;
    mag = u; neg = n;
    #1;
    exp = n ? -longint'(u) : longint'(u);
    checks++;
    if (longint'($signed(p)) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL mag=%h neg=%b got %h", mag, neg, p);
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
    apply(0, 1);
    apply(32'h4000_0000, 1);
    repeat (20000) apply({1'b0, 31'($urandom)}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

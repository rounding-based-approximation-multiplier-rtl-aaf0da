// tb_roba_sign_detector -- test of the sign detector, signed and unsigned.
//
// Random operands plus the corner values 0, 1, -1, the largest and the most
// negative. The absolute values and the product sign are compared with values
// computed from the operands as integers. A second instance with SIGNED = 0
// must pass operands through and report a positive product.
module tb_roba_sign_detector;

  int checks = 0, failures = 0;

  logic [15:0] a, b, aa, ba, ua, ub;
  logic        neg, uneg;

  roba_sign_detector dut (.a(a), .b(b), .a_abs(aa), .b_abs(ba), .prod_neg(neg));
  roba_sign_detector #(.N(16), .SIGNED(1'b0)) dutu (
    .a(a), .b(b), .a_abs(ua), .b_abs(ub), .prod_neg(uneg)
  );

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%0d exp=%0d", what, a, b, got, exp);
    end
  endtask

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    longint sx, sy;
    a = x; b = y;
    #1;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    check("a_abs", longint'(aa), longint'((sx < 0) ? -sx : sx));
    check("b_abs", longint'(ba), longint'((sy < 0) ? -sy : sy));
    check("neg", longint'(neg), longint'((sx < 0) != (sy < 0)));
    check("u_a", longint'(ua), longint'(x));
    check("u_b", longint'(ub), longint'(y));
    check("u_neg", longint'(uneg), 0);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    repeat (20000) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

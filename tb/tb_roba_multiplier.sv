// tb_roba_multiplier -- end-to-end test of the RoBA multiplier at its default
// size (16 x 16 bits, signed).
//
// 1. Two operand pairs from a published 16-bit simulation (10 x 8 and 8 x 8):
//    the rounded operands, the three shifted products Ar*B, Br*A and Ar*Br
//    and the final product are checked.
// 2. Every pair of a set of corner operands: 0, +-1, powers of two, midpoints
//    3*2^k, the largest and the most negative values.
// 3. Random operand pairs, half of them small so that short operands are
//    covered too.
// Every product is compared with the reference model, which evaluates
// Ar*B + Br*A - Ar*Br from the definition of the rounding. The test also
// counts each mechanism of the datapath -- rounding up, rounding down, a
// midpoint rounded up, a zero operand, a negative product, the most negative
// operand, an exact product (one operand a power of two) and a product below
// the exact one -- and fails if any never occurred. It reports the mean
// relative error of the random products.
module tb_roba_multiplier;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_zero = 0, n_neg = 0, n_minneg = 0;
  int n_exact = 0, n_under = 0;
  real err_sum = 0.0;
  int  err_n = 0;

  logic [15:0] a, b;
  logic [31:0] p;

  roba_multiplier dut (.a(a), .b(b), .p(p));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what,
                 $signed(a), $signed(b), got, exp);
    end
  endtask

  task automatic classify(input longint m);
    longint r = nearest_pow2(m < 0 ? -m : m);
    longint am = (m < 0) ? -m : m;
    if (am == 0) n_zero++;
    else if (r > am) n_up++;
    else if (r < am) n_down++;
    if (am > 2 && (r - am) == (am - r / 2)) n_tie++;
  endtask

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    longint sx, sy, exp, exact;
    a = x; b = y;
    #1;
    sx    = longint'($signed(x));
    sy    = longint'($signed(y));
    exp   = roba(sx, sy);
    exact = sx * sy;
    check("p", longint'($signed(p)), exp);
    classify(sx);
    classify(sy);
    if (exp < 0) n_neg++;
    if (x == 16'h8000 || y == 16'h8000) n_minneg++;
    if (exact != 0 && exp == exact) n_exact++;
    if (((exact < 0) ? -exact : exact) > ((exp < 0) ? -exp : exp)) n_under++;
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [$];

    // 1. Published operand pairs and their intermediate values.
    a = 16'd10; b = 16'd8;
    #1;
    check("x_round", longint'(dut.a_round), 8);
    check("x_enc", longint'(dut.a_enc), 3);
    check("xr_Y", longint'(dut.ar_b), 64'h40);
    check("yr_X", longint'(dut.br_a), 64'h50);
    check("yr_xr", longint'(dut.ar_br), 64'h40);
    check("p 10x8", longint'($signed(p)), 80);
    a = 16'd8; b = 16'd8;
    #1;
    check("xr_Y", longint'(dut.ar_b), 64'h40);
    check("yr_X", longint'(dut.br_a), 64'h40);
    check("yr_xr", longint'(dut.ar_br), 64'h40);
    check("p 8x8", longint'($signed(p)), 64);

    // 2. Corner operands.
    corner = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000, 16'h8001};
    for (int k = 1; k < 15; k++) begin
      corner.push_back(16'(1 << k));
      corner.push_back(-16'(1 << k));
      corner.push_back(16'(3 << (k - 1)));
      corner.push_back(-16'(3 << (k - 1)));
    end
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);

    // 3. Random operands.
    for (int i = 0; i < 200000; i++) begin
      logic [15:0] x, y;
      if (i % 2 == 0) begin
        x = 16'($urandom);
        y = 16'($urandom);
      end else begin
        x = 16'(int'($urandom % 512) - 256);
        y = 16'(int'($urandom % 512) - 256);
      end
      apply(x, y);
      if (x != 0 && y != 0) begin
        real ex, e;
        ex = real'(longint'($signed(x)) * longint'($signed(y)));
        e  = (ex - real'(longint'($signed(p)))) / ex;
        err_sum += (e < 0) ? -e : e;
        err_n++;
      end
    end

    $display("round up %0d, round down %0d, midpoint %0d, zero operand %0d",
             n_up, n_down, n_tie, n_zero);
    $display("negative product %0d, most negative operand %0d, exact %0d, below exact %0d",
             n_neg, n_minneg, n_exact, n_under);
    $display("mean relative error of random products: %f %%", 100.0 * err_sum / err_n);
    checks++; if (n_up == 0)     begin failures++; $display("never rounded up"); end
    checks++; if (n_down == 0)   begin failures++; $display("never rounded down"); end
    checks++; if (n_tie == 0)    begin failures++; $display("never a midpoint"); end
    checks++; if (n_zero == 0)   begin failures++; $display("never a zero operand"); end
    checks++; if (n_neg == 0)    begin failures++; $display("never a negative product"); end
    checks++; if (n_minneg == 0) begin failures++; $display("never the most negative operand"); end
    checks++; if (n_exact == 0)  begin failures++; $display("never an exact product"); end
    checks++; if (n_under == 0)  begin failures++; $display("never below the exact product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

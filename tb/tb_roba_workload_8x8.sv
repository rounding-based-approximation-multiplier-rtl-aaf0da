// tb_roba_workload_8x8 -- the 8 x 8 multiplier, every operand pair.
//
// Builds the multiplier at N = 8 in its signed and its unsigned form and
// applies all 65536 operand pairs to each, comparing every product with the
// reference model. It also reports the mean and largest relative error of
// the signed form against the exact product.
module tb_roba_workload_8x8;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  real err_sum = 0.0, err_max = 0.0;
  int  err_n = 0;

  logic [7:0]  a, b;
  logic [15:0] ps, pu;

  roba_multiplier #(.N(8))                dut_s (.a(a), .b(b), .p(ps));
  roba_multiplier #(.N(8), .SIGNED(1'b0)) dut_u (.a(a), .b(b), .p(pu));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        longint es, eu;
        a = 8'(i); b = 8'(j);
        #1;
        es = roba(longint'($signed(a)), longint'($signed(b)));
        eu = roba(longint'(a), longint'(b));
        checks += 2;
        if (longint'($signed(ps)) != es) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d*%0d got %0d exp %0d", $signed(a), $signed(b), $signed(ps), es);
        end
        if (longint'(pu) != eu) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned %0d*%0d got %0d exp %0d", a, b, pu, eu);
        end
        if (a != 0 && b != 0) begin
          real ex, e;
          ex = real'(longint'($signed(a)) * longint'($signed(b)));
          e  = (ex - real'(longint'($signed(ps)))) / ex;
          if (e < 0) e = -e;
          err_sum += e;
          err_n++;
          if (e > err_max) err_max = e;
        end
      end
    end
    $display("signed 8x8: mean relative error %f %%, largest %f %%",
             100.0 * err_sum / err_n, 100.0 * err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

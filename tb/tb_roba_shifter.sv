// tb_roba_shifter -- test of the power-of-two shifter.
//
// Random data, every shift amount 0..16 and both enable values at the
// widths the 16-bit multiplier uses (16-bit data, 33-bit result, 5-bit
// shift). The output is compared with data * 2^sh computed by
// multiplication, or 0 when disabled.
module tb_roba_shifter;

  int checks = 0, failures = 0;

  logic [15:0] din;
  logic [4:0]  sh;
  logic        en;
  logic [32:0] dout;

  roba_shifter dut (.din(din), .sh(sh), .en(en), .dout(dout));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s <= 16; s++) begin
      repeat (500) begin
        longint exp;
        din = 16'($urandom);
        sh  = 5'(s);
        en  = ($urandom % 4) != 0;
        #1;
        exp = en ? longint'(din) * (longint'(1) << s) : 0;
        checks++;
        if (longint'(dout) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL din=%h sh=%0d en=%b got=%h exp=%h", din, sh, en, dout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

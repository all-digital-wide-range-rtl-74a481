`timescale 1ps/1ps
// tb_start_sign: self-checking test of the start sequencer and Sign register.
//
// Comp is random every cycle. After Start rises, Init must be high after clock
// 1, Sign_CK after clock 2, SAR_Start after clock 3; Sign must equal the Comp
// value sampled at clock 2 and keep it afterwards whatever Comp does. Start low
// must clear everything at once.
module tb_start_sign;
  logic clk_2x = 0, start = 0, comp = 0;
  logic init, sign_ck, sar_start, sign;
  int checks = 0, failures = 0, n_sign1 = 0, n_sign0 = 0;

  start_sign dut (.*);

  always #1000 clk_2x = ~clk_2x;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic exp_sign;
    for (int run = 0; run < 300; run++) begin
      @(negedge clk_2x) start = 0;
      #1;
      check(init, 0, "init clear"); check(sign_ck, 0, "sign_ck clear");
      check(sar_start, 0, "sar_start clear"); check(sign, 0, "sign clear");
      @(negedge clk_2x) start = 1;
      for (int k = 1; k <= 8; k++) begin
        comp = 1'($urandom);
        if (k == 2) exp_sign = comp;
        @(posedge clk_2x); #1;
        check(init, k >= 1, "init");
        check(sign_ck, k >= 2, "sign_ck");
        check(sar_start, k >= 3, "sar_start");
        check(sign, (k >= 2) ? exp_sign : 1'b0, "sign");
        @(negedge clk_2x);
      end
      if (exp_sign) n_sign1++; else n_sign0++;
    end
    if (n_sign1 == 0 || n_sign0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

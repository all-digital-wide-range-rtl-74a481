`timescale 1ps/1ps
// tb_clk_div2: self-checking test of the divide-by-two.
//
// Drives CLK_IN with a random duty cycle that changes every few cycles and
// checks that CLK_2X changes once per rising edge of CLK_IN, never on a falling
// edge, so that its period is two input periods and its duty cycle 50%.
module tb_clk_div2;
  logic clk_in = 0, clk_2x;
  int checks = 0, failures = 0;

  clk_div2 dut (.*);

  initial begin
    #50_000_000;
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
    logic prev;
    int high_ps;
    int n_hi;
    n_hi = 0;
    #100;
    repeat (2000) begin
      high_ps = $urandom_range(200, 800);
      prev = clk_2x;
      clk_in = 1; #1;
      check(clk_2x, ~prev, "toggle on rising edge");
      if (clk_2x) n_hi++;
      #(high_ps - 1);
      prev = clk_2x;
      clk_in = 0; #1;
      check(clk_2x, prev, "no change on falling edge");
      #(1000 - high_ps - 1);
    end
    check(n_hi == 1000, 1'b1, "half of the input cycles high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

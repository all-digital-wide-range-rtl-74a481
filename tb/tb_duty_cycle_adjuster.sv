`timescale 1ps/1ps
// tb_duty_cycle_adjuster: self-checking test of the adjuster model.
//
// For random input period, high time, Sign and Ctrl the bench measures the
// edges of CLK_OUT after the settings have been applied for two cycles and
// checks: rising edge FIXED_PS after the rising edge of the (possibly
// inverted) input, high time equal to the input high time (or low time when
// Sign = 1) plus Ctrl * STEP_PS.
module tb_duty_cycle_adjuster;
  localparam int N = 6, FIXED = 60, STEP = 10;
  logic clk_in = 0, sign = 0, clk_out;
  logic [N-1:0] ctrl = 0;
  int checks = 0, failures = 0;
  int per, hi;
  longint t_ck_rise, t_out_rise, t_out_fall;

  duty_cycle_adjuster #(.N(N), .FIXED_PS(FIXED), .STEP_PS(STEP)) dut (.*);

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle();
    clk_in = 1; #(hi);
    clk_in = 0; #(per - hi);
  endtask

  initial begin
    int heff, exp_hi;
    for (int run = 0; run < 3000; run++) begin
      per  = $urandom_range(1400, 3000);
      ctrl = N'($urandom);
      sign = 1'($urandom);
      // keep the corrected pulse shorter than the period
      heff = per - 63 * STEP - 200;
      hi   = $urandom_range(100, heff);
      if (sign) hi = per - hi;
      repeat (2) cycle();
      // measured cycle: first output pulse after an input edge
      fork
        repeat (2) cycle();
        begin
          if (sign) @(negedge clk_in); else @(posedge clk_in);
          t_ck_rise = $time;
          @(posedge clk_out) t_out_rise = $time;
          @(negedge clk_out) t_out_fall = $time;
        end
      join
      check(t_out_rise - t_ck_rise, longint'(FIXED), "rising edge delay");
      exp_hi = sign ? per - hi : hi;
      exp_hi = exp_hi + int'(ctrl) * STEP;
      check(t_out_fall - t_out_rise, longint'(exp_hi), "high time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

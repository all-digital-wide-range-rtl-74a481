`timescale 1ps/1ps
// tb_duty_cycle_detector: self-checking test of the duty-rate comparator model.
//
// Feeds clocks of random period and high time, including exactly 50%, and
// checks Comp after each pulse: 1 only when the high time is more than half
// the period. Consecutive clocks change their period and duty rate; Comp
// must follow within three pulses, and a pulse longer than the period, or a
// gap of more than twice the period, must not produce a comparison.
module tb_duty_cycle_detector;
  logic clk_out = 0, comp;
  int checks = 0, failures = 0, n1 = 0, n0 = 0, n_eq = 0;

  duty_cycle_detector dut (.*);

  initial begin
    #500_000_000;
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
    int per, hi;
    #100;
    for (int run = 0; run < 3000; run++) begin
      per = 2 * $urandom_range(300, 1500);
      case ($urandom_range(0, 3))
        0:       hi = per / 2;
        1:       hi = per / 2 + 1;
        2:       hi = per / 2 - 1;
        default: hi = $urandom_range(50, per - 50);
      endcase
      // two settling periods at the new rate (a large change of period
      // restarts the measurement), then the checked pulse
      repeat (3) begin
        clk_out = 1; #(hi);
        clk_out = 0; #1;
        #(per - hi - 1);
      end
      check(comp, 2 * hi > per, "comp");
      if (2 * hi == per) n_eq++; else if (comp) n1++; else n0++;
    end
    // stopped clock: settle at 40%, then a pulse three periods long and a
    // 50%+ pulse after a long gap must not change Comp
    repeat (3) begin clk_out = 1; #400; clk_out = 0; #600; end
    check(comp, 1'b0, "settled low");
    clk_out = 1; #3000; clk_out = 0; #1;
    check(comp, 1'b0, "stopped high: no comparison");
    #5000;
    clk_out = 1; #700; clk_out = 0; #1;
    check(comp, 1'b0, "after a gap: no comparison");
    #299;
    repeat (2) begin clk_out = 1; #700; clk_out = 0; #300; end
    check(comp, 1'b1, "measuring again after the stop");
    if (n1 == 0 || n0 == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

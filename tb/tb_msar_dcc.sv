`timescale 1ps/1ps
// tb_msar_dcc: end-to-end test of the closed-loop duty-cycle corrector at its
// default parameters (6-bit Ctrl, 10 ps delay step, 60 ps fixed delay).
//
// Each run sets an input clock period and duty rate, pulses Start low and then
// high, and checks:
//   * Sign = 1 exactly when the input duty rate is above 50%;
//   * SAR_Start three CLK_2X clocks after Start and Stop seven clocks after
//     SAR_Start (binary search of 6 bits), End one clock later;
//   * Ctrl at Stop equals floor((P/2 - Heff) / 10 ps) clipped to 0..63, where
//     Heff is the high time of the (possibly inverted) input, and the measured
//     high time of CLK_OUT is within one step of half the period;
//   * after a drift of the input duty rate, the counter mode moves Ctrl back
//     to a corrected duty rate (closed loop), and saturates at 63 when the
//     correction needed exceeds the range;
//   * power-down: with the input clock stopped, Sign and Ctrl are kept, and
//     when it returns the output is corrected again without a new search
//     (within a few CLK_2X cycles: a comparison that was still on its way
//     when the clock stopped can move Ctrl by one step).
// The number of times each mechanism occurred is counted; one that never
// occurs counts as a failure.
module tb_msar_dcc;
  localparam int STEP = 10;
  localparam int MAXC = 63;

  logic clk_in = 0, start = 0;
  logic clk_out, sign, comp, clk_2x, sar_start, stop, done;
  logic [5:0] ctrl;

  int checks = 0, failures = 0;
  int per = 1000, hi = 500;
  int n_sign0 = 0, n_sign1 = 0, n_search = 0, n_up = 0, n_down = 0;
  int n_track = 0, n_sat = 0, n_pd = 0;

  msar_dcc dut (.*);

  // input clock with variable period and high time
  logic pd = 0;   // power-down: input clock stopped low
  initial forever begin
    if (pd) begin
      clk_in = 0;
      wait (!pd);
    end else begin
      clk_in = 1; #(hi);
      clk_in = 0; #(per - hi);
    end
  end


  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t (per=%0d hi=%0d)",
               what, got, exp, $time, per, hi);
    end
  endtask

  function automatic int expected_ctrl(input logic s);
    int heff = s ? per - hi : hi;
    int c = (per / 2 - heff) / STEP;
    if (per / 2 - heff < 0) c = 0;
    if (c > MAXC) c = MAXC;
    return c;
  endfunction

  task automatic clk2();
    @(posedge clk_2x); #1;
  endtask

  // the most recent complete high time of CLK_OUT, sampled after a full period
  task automatic measure(output int high, output int period);
    longint t_prev_r, t_r, t_f;
    @(posedge clk_out) t_prev_r = $time;
    @(posedge clk_out) t_r = $time;
    @(negedge clk_out) t_f = $time;
    high = int'(t_f - t_r);
    period = int'(t_r - t_prev_r);
  endtask

  initial begin
    int high, period, prev, cnt;
    for (int run = 0; run < 400; run++) begin
      case (run)
        0: begin per = 1000; hi = 500; end
        1: begin per = 1000; hi = 300; end
        2: begin per = 1000; hi = 700; end
        3: begin per = 2500; hi = 500; end     // needs more than 63 steps
        default: begin
          per = 2 * $urandom_range(400, 1200);
          hi  = $urandom_range(per / 2 - 600 > per / 5 ? per / 2 - 600 : per / 5,
                               per / 2 + 600 < per - per / 5 ? per / 2 + 600 : per - per / 5);
        end
      endcase
      @(negedge clk_2x) start = 0;
      repeat (3) clk2();
      check(int'(ctrl), 0, "ctrl reset");
      @(negedge clk_2x) start = 1;
      cnt = 0;
      while (!sar_start && cnt < 20) begin clk2(); cnt++; end
      check(cnt, 3, "clocks from Start to SAR_Start");
      check(int'(sign), int'(2 * hi > per), "sign");
      if (sign) n_sign1++; else n_sign0++;
      cnt = 0;
      while (!stop && cnt < 20) begin clk2(); cnt++; end
      check(cnt, 7, "search clocks (SAR_Start to Stop)");
      check(int'(ctrl), expected_ctrl(sign), "search result");
      n_search++;
      if (int'(ctrl) == MAXC && expected_ctrl(sign) == MAXC) n_sat++;
      check(int'(done), 0, "End after Stop");
      clk2();
      check(int'(done), 1, "End");
      measure(high, period);
      check(period, per, "output period");
      if (expected_ctrl(sign) < MAXC)
        check(int'(high - per / 2 <= STEP && per / 2 - high <= STEP), 1, "duty within one step");
      // counter mode: hold lock for a few cycles
      repeat (8) begin
        prev = int'(ctrl); clk2();
        if (int'(ctrl) > prev) n_up++;
        if (int'(ctrl) < prev) n_down++;
      end
      // power-down: the clock stops for a while; the code is kept and the
      // output is corrected again as soon as the clock returns
      if (run % 4 == 2) begin
        logic [5:0] held;
        logic       held_sign;
        held = ctrl;
        held_sign = sign;
        @(negedge clk_in) pd = 1;
        #(20 * per);
        check(int'(ctrl), int'(held), "code kept in power-down");
        pd = 0;
        // a Comp sampled just before the stop may move Ctrl by one step;
        // the counter recovers within a few CLK_2X cycles
        repeat (4) clk2();
        check(int'(int'(ctrl) - int'(held) <= 2 && int'(held) - int'(ctrl) <= 2), 1,
              "code near the stored one after power-down");
        measure(high, period);
        check(int'(stop), 1, "no new search after power-down");
        check(int'(sign), int'(held_sign), "sign kept in power-down");
        if (expected_ctrl(sign) < MAXC)
          check(int'(high - per / 2 <= STEP && per / 2 - high <= STEP), 1, "duty after power-down");
        n_pd++;
      end
      // drift of the input duty rate by up to +/-150 ps
      if (run % 2 == 1 && expected_ctrl(sign) < MAXC) begin
        automatic int d = $urandom_range(0, 300) - 150;
        hi = hi + d;
        repeat (40) begin
          prev = int'(ctrl); clk2();
          if (int'(ctrl) > prev) n_up++;
          if (int'(ctrl) < prev) n_down++;
        end
        measure(high, period);
        if (expected_ctrl(sign) > 0 && expected_ctrl(sign) < MAXC) begin
          check(int'(high - per / 2 <= STEP && per / 2 - high <= STEP), 1, "tracked drift");
          n_track++;
        end
      end
    end
    $display("sign0=%0d sign1=%0d searches=%0d up=%0d down=%0d tracked=%0d saturated=%0d power_down=%0d",
             n_sign0, n_sign1, n_search, n_up, n_down, n_track, n_sat, n_pd);
    if (n_pd == 0)    begin failures++; $display("FAIL power-down never seen"); end
    if (n_sign0 == 0) begin failures++; $display("FAIL Sign=0 never seen"); end
    if (n_sign1 == 0) begin failures++; $display("FAIL Sign=1 never seen"); end
    if (n_up == 0)    begin failures++; $display("FAIL count up never seen"); end
    if (n_down == 0)  begin failures++; $display("FAIL count down never seen"); end
    if (n_track == 0) begin failures++; $display("FAIL drift tracking never seen"); end
    if (n_sat == 0)   begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

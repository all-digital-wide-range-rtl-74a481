`timescale 1ps/1ps
// tb_msar_controller: self-checking test of the MSAR controller in a loop
// with an ideal duty-cycle adjuster and comparator written in the bench.
//
// Times are counted in delay-line steps. The input clock has period P and high
// time H; the adjuster output is high for Heff + Ctrl where Heff = H, or P - H
// when Sign = 1; Comp = 1 when 2*(Heff + Ctrl) > P. For each run the bench
// checks:
//   * Sign = (2H > P), captured at clock 2 after Start;
//   * Stop rises exactly at clock N+4 (N+1 = 7 search clocks after SAR_Start),
//     End one clock later, with Ctrl = the largest code that keeps the duty
//     rate at or below 50% (clipped to 0 .. 2^N-1);
//   * in counter mode Ctrl moves one step per clock towards that code and then
//     stays within one step of it; after a drift of H it tracks the new code;
//   * the counter saturates at 2^N-1 and at 0 instead of wrapping.
module tb_msar_controller;
  localparam int N = 6;
  localparam int MAXC = 2**N - 1;
  logic clk_2x = 0, start = 0, comp;
  logic sign, sar_start, stop, done;
  logic [N-1:0] ctrl;
  int checks = 0, failures = 0;
  int P, H;
  int n_sign0 = 0, n_sign1 = 0, n_up = 0, n_down = 0, n_sat_hi = 0, n_sat_lo = 0;

  function automatic int heff();
    return sign ? P - H : H;
  endfunction

  always_comb comp = (2 * (heff() + int'(ctrl)) > P);

  msar_controller #(.N(N)) dut (.*);

  always #1000 clk_2x = ~clk_2x;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t (P=%0d H=%0d)", what, got, exp, $time, P, H);
    end
  endtask

  function automatic int target();
    int c = P / 2 - heff();   // largest c with 2*(heff+c) <= P
    if (c < 0) c = 0;
    if (c > MAXC) c = MAXC;
    return c;
  endfunction

  task automatic clock();
    @(posedge clk_2x); #1;
  endtask

  initial begin
    int prev, t;
    for (int run = 0; run < 400; run++) begin
      P = $urandom_range(40, 160);
      H = $urandom_range(P / 8, P - P / 8);
      @(negedge clk_2x) start = 0;
      #1 check(int'(ctrl), 0, "ctrl reset");
      check(int'(sign), 0, "sign reset");
      @(negedge clk_2x) start = 1;
      for (int k = 1; k <= N + 3; k++) begin
        clock();
        check(int'(stop), 0, "stop early");
        if (k == 2) check(int'(sign), int'(2 * H > P), "sign");
        if (k == 3) check(int'(sar_start), 1, "sar_start");
      end
      if (sign) n_sign1++; else n_sign0++;
      clock();   // clock N+4
      check(int'(stop), 1, "stop at clock N+4");
      check(int'(done), 0, "end after stop");
      check(int'(ctrl), target(), "search result");
      clock();
      check(int'(done), 1, "end");
      // counter mode: dither within one step of the target
      repeat (6) begin
        prev = int'(ctrl);
        clock();
        t = target();
        if (int'(ctrl) > prev) n_up++;
        if (int'(ctrl) < prev) n_down++;
        check(int'(int'(ctrl) >= t && int'(ctrl) <= t + 1 || int'(ctrl) == MAXC && t == MAXC), 1, "dither");
      end
      // drift of the input high time
      H = H + $urandom_range(0, 40) - 20;
      if (H < 1) H = 1;
      if (H > P - 1) H = P - 1;
      repeat (70) begin
        prev = int'(ctrl);
        clock();
        if (int'(ctrl) > prev) n_up++;
        if (int'(ctrl) < prev) n_down++;
        check(int'((int'(ctrl) - prev) <= 1 && (prev - int'(ctrl)) <= 1), 1, "one step per clock");
        if (prev == MAXC && !comp) n_sat_hi++;
        if (prev == 0 && comp) n_sat_lo++;
      end
      t = target();
      check(int'(int'(ctrl) >= t && int'(ctrl) <= t + 1 || int'(ctrl) == MAXC && t == MAXC), 1, "tracked drift");
    end
    // saturation: far too short high time, then far too long
    P = 200; H = 10;
    @(negedge clk_2x) start = 0;
    @(negedge clk_2x) start = 1;
    repeat (N + 8) clock();
    check(int'(ctrl), MAXC, "saturate high");
    n_sat_hi++;
    H = 190;   // no sign change after start: Heff becomes far above P/2
    repeat (70) clock();
    check(int'(ctrl), 0, "saturate low");
    clock();
    check(int'(ctrl), 0, "stay at zero");
    n_sat_lo++;
    $display("sign0=%0d sign1=%0d up=%0d down=%0d sat_hi=%0d sat_lo=%0d",
             n_sign0, n_sign1, n_up, n_down, n_sat_hi, n_sat_lo);
    if (n_sign0 == 0 || n_sign1 == 0 || n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

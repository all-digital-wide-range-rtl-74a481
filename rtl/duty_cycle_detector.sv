`timescale 1ps/1ps
// duty_cycle_detector: BEHAVIOURAL MODEL (not synthesizable) of the analog
// duty-rate comparator.
//
// The real part is a folded preamplifier that integrates the difference of the
// differential clock CLK_OUT / ~CLK_OUT onto two capacitors, a regenerative
// latch and inverter buffers; it only tells whether the positive duty rate of
// CLK_OUT is above 50%. This model measures each pulse of CLK_OUT: at every
// falling edge it compares twice the width of the high pulse that just ended
// with the period between the two latest rising edges and sets
//   Comp = 1  when the duty rate is above 50%,
//   Comp = 0  when it is 50% or below.
// Comp thus follows a change of the adjuster within one output period, well
// inside the two input periods of a controller cycle. When the spacing of two
// rising edges is more than twice the previous period, or a pulse is longer
// than the period (the clock was stopped, as in power-down), Comp is held until a full period has been measured again,
// as the real comparator holds its result while its clock is stopped. The
// integration phases
// that the real part takes from CLK_2X, its bias inputs and its offset are not
// modelled.
module duty_cycle_detector (
  input  logic clk_out,  // CLK_OUT
  output logic comp      // Comp: duty rate above 50%
);

  longint unsigned t_rise, period, high, new_period;
  int unsigned     n_rise;

  initial begin
    comp   = 1'b0;
    t_rise = 0;
    period = 0;
    n_rise = 0;
  end

  always @(posedge clk_out) begin
    new_period = $time - t_rise;
    // a gap of more than two periods means the clock had stopped
    if (n_rise >= 2 && new_period > 2 * period) n_rise = 1;
    else if (n_rise < 2) n_rise++;
    period = new_period;
    t_rise = $time;
  end

  always @(negedge clk_out) begin
    high = $time - t_rise;
    // a pulse longer than the period means the clock had stopped high
    if (high >= period) n_rise = 0;
    else if (n_rise >= 2) comp <= (2 * high > period);
  end

endmodule

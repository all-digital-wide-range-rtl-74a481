`timescale 1ps/1ps
// msar_dcc: all-digital MSAR-controlled duty-cycle corrector (top).
//
// The corrector brings the duty cycle of a clock to 50% in closed loop. The
// duty-cycle adjuster lengthens the high time of the (possibly inverted) input
// clock by Ctrl steps of a programmable delay line; the duty-cycle detector
// reports whether the corrected clock CLK_OUT is high for more than half its
// period (Comp); the MSAR controller, clocked by CLK_2X = CLK_IN/2, first
// captures Sign from the uncorrected clock, then finds Ctrl by a 6-bit binary
// search (7 CLK_2X cycles) and finally keeps adjusting Ctrl by one LSB per
// cycle as an up/down counter, so the loop follows later drift of the input
// duty cycle, supply or temperature.
//
// Start low resets the controller (Sign = 0, Ctrl = 0, CLK_OUT is the delayed
// input clock); correction begins when Start rises. End rises when the binary
// search is over and the counter mode has begun; it is meant for the DLL that
// uses the clock, which also needs Sign because with Sign = 1 the output is
// the corrected inverted clock.
//
// The adjuster and detector are behavioural models of analog circuits, so this
// top simulates but does not synthesize as a whole; the divider and the
// controller are synthesizable. The block structure follows the published MSAR-DCC.
module msar_dcc #(
  parameter int unsigned N = msar_dcc_pkg::CTRL_BITS
) (
  input  logic         clk_in,     // CLK_IN, clock to be corrected
  input  logic         start,      // Start, low = reset
  output logic         clk_out,    // CLK_OUT, corrected clock
  output logic         sign,       // Sign, CLK_OUT derived from ~CLK_IN
  output logic [N-1:0] ctrl,       // Ctrl, falling-edge delay setting
  output logic         comp,       // Comp, duty rate of CLK_OUT above 50%
  output logic         clk_2x,     // CLK_2X, controller clock
  output logic         sar_start,  // SAR_Start, binary search running
  output logic         stop,       // binary search done, counter mode
  output logic         done        // End
);

  clk_div2 u_div2 (
    .clk_in (clk_in),
    .clk_2x (clk_2x)
  );

  duty_cycle_adjuster #(.N(N)) u_adjuster (
    .clk_in  (clk_in),
    .sign    (sign),
    .ctrl    (ctrl),
    .clk_out (clk_out)
  );

  duty_cycle_detector u_detector (
    .clk_out (clk_out),
    .comp    (comp)
  );

  msar_controller #(.N(N)) u_ctrl (
    .clk_2x    (clk_2x),
    .start     (start),
    .comp      (comp),
    .sign      (sign),
    .ctrl      (ctrl),
    .sar_start (sar_start),
    .stop      (stop),
    .done      (done)
  );

endmodule

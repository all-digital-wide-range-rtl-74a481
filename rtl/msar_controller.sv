`timescale 1ps/1ps
// msar_controller: the modified-SAR controller of the duty-cycle corrector.
//
// It turns the one-bit duty-rate comparison Comp into the adjuster settings
// Sign and Ctrl[N-1:0]. It combines
//   * start_sign: after Start rises, captures Sign from the uncorrected clock
//     and then raises SAR_Start;
//   * msar_array: N-bit binary search of Ctrl from MSB to LSB, one bit per
//     CLK_2X cycle, after which every bit becomes an up/down counter bit so the
//     loop stays closed and keeps tracking drift;
//   * the up/down decision for the LSB in counter mode: count up (longer high
//     time) while Comp is 0, count down while Comp is 1.
//
// Timing, in CLK_2X cycles after Start rises: Sign at clock 2, SAR_Start at 3,
// Ctrl MSB trial at 4, LSB decided and Stop high at clock N+4 (that is N+1 = 7
// cycles of the search for N = 6), End high one clock later. From the clock
// after Stop on, Ctrl moves by one LSB per cycle.
//
// The blocks and the counter mode follow the published MSAR-DCC. Two points are this
// model's own: the LSB direction is taken directly from Comp, and the counter
// saturates (no count up at all ones, no count down at zero) instead of
// wrapping, which would throw the duty rate from one end to the other.
module msar_controller #(
  parameter int unsigned N = msar_dcc_pkg::CTRL_BITS
) (
  input  logic         clk_2x,     // CLK_2X (CLK_SAR)
  input  logic         start,      // Start, low = reset
  input  logic         comp,       // duty rate of CLK_OUT above 50%
  output logic         sign,       // invert the input clock
  output logic [N-1:0] ctrl,       // programmable delay setting
  output logic         sar_start,  // binary search running
  output logic         stop,       // binary search done, counter mode
  output logic         done        // End
);

  logic init, sign_ck, up, dn;

  start_sign u_start_sign (
    .clk_2x    (clk_2x),
    .start     (start),
    .comp      (comp),
    .init      (init),
    .sign_ck   (sign_ck),
    .sar_start (sar_start),
    .sign      (sign)
  );

  assign up = stop & ~comp & ~(&ctrl);
  assign dn = stop &  comp &  (|ctrl);

  msar_array #(.N(N)) u_msar (
    .clk   (clk_2x),
    .start (sar_start),
    .comp  (comp),
    .up    (up),
    .dn    (dn),
    .q     (ctrl),
    .stop  (stop),
    .done  (done)
  );

endmodule

`timescale 1ps/1ps
// duty_cycle_adjuster: BEHAVIOURAL MODEL (not synthesizable) of the analog
// duty-cycle adjuster.
//
// The real part is built from an inversion MUX, a fixed rising-edge generator
// (a dummy delay line), a falling-edge generator with a 6-bit programmable delay
// line, an edge-combining latch and an output buffer. This model keeps that
// structure with ideal delays:
//   CK_in   = Sign ? ~CLK_IN : CLK_IN                        (MUX)
//   CLK_OUT rises FIXED_PS after each rising edge of CK_in   (dummy delay line)
//   CLK_OUT falls FIXED_PS + Ctrl*STEP_PS after each falling edge of CK_in
//                                                            (programmable line)
// so the high time of CLK_OUT is the high time of CK_in plus Ctrl*STEP_PS. With
// Sign = 1 the adjuster works on the inverted clock, whose duty rate is below
// 50% when that of CLK_IN is above it; only lengthening of the high time is
// therefore needed. Ctrl is read when a falling edge of CK_in enters the
// delay line. Only the falling edge is adjustable, as in the published MSAR-DCC; FIXED_PS
// and STEP_PS are example values of this model.
module duty_cycle_adjuster #(
  parameter int unsigned N        = msar_dcc_pkg::CTRL_BITS,
  parameter int unsigned FIXED_PS = msar_dcc_pkg::ADJ_FIXED_DELAY_PS,
  parameter int unsigned STEP_PS  = msar_dcc_pkg::ADJ_STEP_PS
) (
  input  logic         clk_in,   // CLK_IN
  input  logic         sign,     // Sign: select the inverted input clock
  input  logic [N-1:0] ctrl,     // Ctrl: falling-edge delay setting
  output logic         clk_out   // CLK_OUT
);

  logic ck_in;
  assign ck_in = sign ? ~clk_in : clk_in;

  initial clk_out = 1'b0;

  always @(posedge ck_in) clk_out <= #(FIXED_PS) 1'b1;

  always @(negedge ck_in) clk_out <= #(FIXED_PS + ctrl * STEP_PS) 1'b0;

endmodule

`timescale 1ps/1ps
// clk_div2: divide-by-two of the input clock, giving CLK_2X.
//
// A toggle flip-flop on the rising edge of CLK_IN. CLK_2X has half the input
// frequency and a 50% duty cycle whatever the duty cycle of CLK_IN, and its
// edges follow the rising edges of CLK_IN. It clocks the controller, so the
// correction loop takes one decision every two input cycles.
//
// The block and its ratio follow the published MSAR-DCC; having no reset is this model's
// choice: the divider runs freely and its starting phase does not matter.
module clk_div2 (
  input  logic clk_in,  // CLK_IN
  output logic clk_2x   // CLK_2X
);

  always_ff @(posedge clk_in) clk_2x <= ~clk_2x;

endmodule

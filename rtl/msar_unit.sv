`timescale 1ps/1ps
// msar_unit: one bit of the modified successive-approximation register (MSAR).
//
// The unit holds one bit Q of the control word and works in two modes chosen by
// Enable:
//   Enable = 0  binary search. A cleared unit whose Shift input is high sets Q
//               (the trial value 1). A unit that holds Q = 1 while still in this
//               mode is the bit under test and, at the next clock, keeps Q = 1
//               if Comp is 0 (duty rate of the output still at or below 50%)
//               or clears it if Comp is 1.
//   Enable = 1  up/down counter bit. Q toggles when exactly one of U (count up)
//               and D (count down) is high. The carry UO = U & Q and the borrow
//               DO = D & ~Q go to the next more significant unit.
// Start low clears Q asynchronously. All state changes on the rising edge of
// clk (CLK_SAR).
//
// The two modes, the port names and the role of Enable follow the published MSAR-DCC's MSAR
// unit. The gate-level realisation is not reproduced; the equations above are
// this model's own, the simplest logic that has the described behaviour.
module msar_unit (
  input  logic clk,     // CLK_SAR
  input  logic start,   // Start, active-high run, low = clear
  input  logic shift,   // this unit is the next one to be tried
  input  logic enable,  // 0: binary search, 1: counter
  input  logic comp,    // duty rate above 50%
  input  logic u,       // count-up carry in
  input  logic d,       // count-down borrow in
  output logic q,       // control bit
  output logic uo,      // count-up carry out
  output logic do_o     // count-down borrow out
);

  logic q_next;

  always_comb begin
    if (enable) q_next = q ^ (u ^ d);
    else if (q) q_next = ~comp;
    else        q_next = shift;
  end

  always_ff @(posedge clk or negedge start) begin
    if (!start) q <= 1'b0;
    else        q <= q_next;
  end

  assign uo   = u & q;
  assign do_o = d & ~q;

endmodule

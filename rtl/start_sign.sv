`timescale 1ps/1ps
// start_sign: start sequencer and Sign register of the duty-cycle controller.
//
// Three flip-flops clocked by CLK_2X form a shift chain whose first input is
// tied high: one clock after Start rises Init is high, one clock later Sign_CK
// rises, and one clock after that SAR_Start rises and lets the MSAR search
// begin. At the clock where Sign_CK rises, Comp is captured into Sign. During
// that time Ctrl is still all zero and Sign still 0, so Comp reports the duty
// rate of the uncorrected input clock: Sign = 1 means the input duty rate is
// above 50% and the adjuster must work on the inverted clock.
//
// Start low clears all four flip-flops asynchronously.
//
// The chain (D tied high, Init, Sign_CK, SAR_Start) and the Sign flip-flop fed
// by Comp follow the published MSAR-DCC's start circuit. There the Sign flip-flop is
// clocked by Sign_CK itself; here it is clocked by CLK_2X and loads only on the
// clock where Sign_CK rises, which captures the same value without a derived
// clock. Start low as the reset state is this model's reading.
module start_sign (
  input  logic clk_2x,     // CLK_2X
  input  logic start,      // Start, low = reset
  input  logic comp,       // duty rate above 50%
  output logic init,       // Init
  output logic sign_ck,    // Sign_CK
  output logic sar_start,  // SAR_Start
  output logic sign        // Sign
);

  always_ff @(posedge clk_2x or negedge start) begin
    if (!start) begin
      init      <= 1'b0;
      sign_ck   <= 1'b0;
      sar_start <= 1'b0;
      sign      <= 1'b0;
    end else begin
      init      <= 1'b1;
      sign_ck   <= init;
      sar_start <= sign_ck;
      if (init && !sign_ck) sign <= comp;
    end
  end

endmodule

`timescale 1ps/1ps
// msar_array: N-bit modified SAR (MSAR) circuit, N = 6 by default.
//
// N msar_unit bits (index N-1 = MSB, D5 ... D0 for N = 6), a chain of OR gates
// and two flip-flops, Stop and End.
//
// Binary search. After Start rises the MSB unit, whose Shift input is tied
// high, takes the trial value 1 at the first clock. At each later clock the
// bit under test is decided from Comp and the next lower bit takes the trial
// value, so the search runs from MSB to LSB, one bit per clock. The Enable of
// unit i is the OR of Q and Enable of unit i-1, and the Enable of unit 0 is
// Stop: as soon as a lower unit has started, the OR output turns the upper unit
// into a counter bit that holds its decided value (the counter chain carries no
// count before Stop). When the LSB is decided, the Stop flip-flop is set and
// holds itself through its OR gate, so every unit is a counter from then on.
// End is Stop delayed by one clock.
//
// Timing: with Start high, Q[N-1] is set by clock 1, bit N-1-k is decided at
// clock k+2, Stop rises at clock N+1 (7 for N = 6) with the final search
// result on q, and End rises at clock N+2.
//
// Counter mode. up/dn drive the U/D inputs of the LSB unit; carries ripple to
// the MSB. The caller must hold up/dn low until Stop is high and must not
// assert both at once; two assertions check this.
//
// The unit count, six OR gates, two DFFs, the Shift tie-off of the MSB and the
// names Stop and Comp follow the published MSAR-DCC's 6-bit MSAR circuit. How the OR gates
// are connected and that the second flip-flop acts as End are this model's
// reading of it.
module msar_array #(
  parameter int unsigned N = msar_dcc_pkg::CTRL_BITS
) (
  input  logic         clk,    // CLK_SAR
  input  logic         start,  // SAR_Start, low = clear
  input  logic         comp,   // duty rate above 50%
  input  logic         up,     // count up   (counter mode)
  input  logic         dn,     // count down (counter mode)
  output logic [N-1:0] q,      // control word Ctrl
  output logic         stop,   // binary search finished, counter mode
  output logic         done    // End
);

  logic [N-1:0] shift, enable, uo, dout;
  logic [N:0]   uc, dc;        // carry / borrow chain, index 0 = LSB input

  assign uc[0] = up;
  assign dc[0] = dn;

  for (genvar i = 0; i < N; i++) begin : g_unit
    if (i == N-1) begin : g_msb
      assign shift[i] = 1'b1;
    end else begin : g_low
      assign shift[i] = q[i+1] & ~enable[i+1];
    end

    if (i == 0) begin : g_lsb_en
      assign enable[i] = stop;
    end else begin : g_or
      assign enable[i] = q[i-1] | enable[i-1];
    end

    msar_unit u_unit (
      .clk    (clk),
      .start  (start),
      .shift  (shift[i]),
      .enable (enable[i]),
      .comp   (comp),
      .u      (uc[i]),
      .d      (dc[i]),
      .q      (q[i]),
      .uo     (uo[i]),
      .do_o   (dout[i])
    );

    assign uc[i+1] = uo[i];
    assign dc[i+1] = dout[i];
  end

  // Stop is set when the LSB is the bit under test, and holds itself.
  logic stop_d;
  assign stop_d = stop | (q[0] & ~enable[0]);

  always_ff @(posedge clk or negedge start) begin
    if (!start) begin
      stop <= 1'b0;
      done <= 1'b0;
    end else begin
      stop <= stop_d;
      done <= stop;
    end
  end

  // Counter commands: never up and down together, none before Stop.
  a_updn_exclusive: assert property (@(posedge clk) disable iff (!start) !(up && dn))
    else $error("msar_array: up and dn asserted together");
  a_count_after_stop: assert property (@(posedge clk) disable iff (!start) (up || dn) |-> stop)
    else $error("msar_array: count command during the binary search");

endmodule

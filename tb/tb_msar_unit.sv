`timescale 1ps/1ps
// tb_msar_unit: self-checking test of one MSAR bit.
//
// Drives random Shift, Enable, Comp, U, D (never U and D together) for many
// clocks and compares Q, UO and DO with a reference computed here: in search
// mode a cleared bit loads Shift and a set bit loads ~Comp; in counter mode the
// bit toggles on U or D; UO = U & Q, DO = D & ~Q. Also checks the clear by
// Start and directed search/count sequences.
module tb_msar_unit;
  logic clk = 0, start = 0, shift = 0, enable = 0, comp = 0, u = 0, d = 0;
  logic q, uo, do_o;
  logic q_ref;
  int   checks = 0, failures = 0;

  msar_unit dut (.*);

  always #500 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic step(input logic s, input logic e, input logic c,
                      input logic uu, input logic dd);
    @(negedge clk);
    shift = s; enable = e; comp = c; u = uu; d = dd;
    #1;
    check(uo, uu & q, "uo");
    check(do_o, dd & ~q, "do");
    if (e)      q_ref = q ^ (uu ^ dd);
    else if (q) q_ref = ~c;
    else        q_ref = s;
    @(posedge clk); #1;
    check(q, q_ref, "q");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check(q, 1'b0, "reset");
    @(negedge clk) start = 1;
    // directed: trial set, decide keep (comp=0), hold in counter mode
    step(1, 0, 0, 0, 0); check(q, 1, "trial set");
    step(0, 0, 0, 0, 0); check(q, 1, "kept");
    step(0, 1, 1, 0, 0); check(q, 1, "hold");
    // count down then up
    step(0, 1, 0, 0, 1); check(q, 0, "down");
    step(0, 1, 0, 1, 0); check(q, 1, "up");
    // decide clear
    @(negedge clk) begin start = 0; enable = 0; u = 0; d = 0; shift = 0; end
    #1 check(q, 0, "async clear");
    @(negedge clk) start = 1;
    step(1, 0, 1, 0, 0);
    step(1, 0, 1, 0, 0); check(q, 0, "cleared by comp");
    // random
    repeat (2000) begin
      logic [1:0] ud;
      ud = 2'($urandom_range(0, 2));
      step(1'($urandom), 1'($urandom), 1'($urandom), ud[0], ud[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

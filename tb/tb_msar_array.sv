`timescale 1ps/1ps
// tb_msar_array: self-checking test of the 6-bit MSAR circuit.
//
// For many random targets the bench plays the duty-rate comparator: Comp is 1
// when the current code is above the target. The binary search must then end
// on the target itself. The bench checks the code after every clock against a
// step-by-step model of the MSB-to-LSB search, checks that Stop rises exactly
// N+1 clocks after Start and End one clock later, and then checks counter mode
// with random up/down/hold commands against a modulo-2^N reference.
module tb_msar_array;
  localparam int unsigned N = 6;
  logic clk = 0, start = 0, comp, up = 0, dn = 0;
  logic [N-1:0] q;
  logic stop, done;
  int checks = 0, failures = 0;
  int n_search = 0, n_up = 0, n_down = 0;

  logic [N-1:0] target;
  assign comp = (q > target);

  msar_array #(.N(N)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [N-1:0] exp_q;
    for (int run = 0; run < 200; run++) begin
      @(negedge clk);
      start = 0; up = 0; dn = 0;
      target = (run < 2**N) ? N'(run) : N'($urandom);
      #1 check(q, 0, "cleared");
      check(N'(stop), 0, "stop cleared");
      @(negedge clk) start = 1;
      // search: clock 1 sets the MSB, clock k+2 decides bit N-1-k
      exp_q = '0;
      for (int k = 0; k <= N; k++) begin
        if (k > 0) begin
          if (exp_q > target) exp_q[N-k] = 1'b0;
        end
        if (k < N) exp_q[N-1-k] = 1'b1;
        @(posedge clk); #1;
        check(q, exp_q, "search step");
        check(N'(stop), N'(k == N), "stop timing");
        check(N'(done), 0, "end before stop");
      end
      check(q, target, "search result");
      n_search++;
      @(posedge clk); #1;
      check(N'(done), 1, "end one clock after stop");
      check(q, target, "hold with no count");
      // counter mode
      repeat (20) begin
        int cmd;
        @(negedge clk);
        cmd = $urandom_range(0, 2);
        up = (cmd == 1); dn = (cmd == 2);
        if (cmd == 1) begin exp_q = q + 1'b1; n_up++; end
        else if (cmd == 2) begin exp_q = q - 1'b1; n_down++; end
        else exp_q = q;
        @(posedge clk); #1;
        check(q, exp_q, "count");
        check(N'(stop), 1, "stop sticky");
      end
    end
    if (n_up == 0 || n_down == 0 || n_search == 0) failures++;
    $display("searches=%0d ups=%0d downs=%0d", n_search, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

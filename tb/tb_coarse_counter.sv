`timescale 1ps / 1fs
// tb_coarse_counter: starts and stops the counter with known gaps and checks
// the count (cycles from start to stop), the same-cycle case (0), a stop
// with no start (ignored) and the timeout when no stop comes.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_coarse_counter;
  localparam int W = 6;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, start = 0, stop = 0;
  logic [W-1:0] count;
  logic done, timeout, running;
  int checks = 0, failures = 0;

  coarse_counter #(.CNT_W(W)) dut (.clk, .rst_n, .start, .stop, .count, .done, .timeout, .running);

  always #1250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int gap);
    @(negedge clk);
    start = 1; stop = (gap == 0);
    @(negedge clk);
    start = 0; stop = 0;
    if (gap > 0) begin
      repeat (gap - 1) @(negedge clk);
      stop = 1;
      @(negedge clk);
      stop = 0;
    end
    check(done === 1'b1, $sformatf("done after gap %0d", gap));
    check(count == W'(gap), $sformatf("count %0d expected %0d", count, gap));
    @(negedge clk);
    check(!done && !running, "done is one cycle, counter idle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(0);
    measure(1);
    measure(7);
    measure(40);
    measure(63);
    // stop without start: nothing happens
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    check(!done && !running, "lone stop ignored");
    // timeout
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    begin
      int n = 1;
      while (!timeout && n < 200) begin @(negedge clk); n++; end
      check(timeout === 1'b1, "timeout reported");
      // counts 1..2^W-1 are legal, so the timeout comes 2^W cycles after start
      check(n == (1 << W), $sformatf("timeout after %0d cycles, expected %0d", n, 1 << W));
    end
    @(negedge clk);
    check(!running && !done, "idle after timeout");
    measure(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

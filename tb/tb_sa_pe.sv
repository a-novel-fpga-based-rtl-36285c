`timescale 1ps / 1fs
// tb_sa_pe: random signed weights, inputs and partial sums, including the
// int8 extremes. Checks psum_out = psum_in + x_in*w and x_out = x_in one
// cycle later, and that the weight holds while w_load is low.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_sa_pe;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, w_load = 0;
  logic signed [7:0] w_in, x_in, x_out;
  logic signed [31:0] psum_in, psum_out;
  int checks = 0, failures = 0;

  sa_pe #(.ACC_W(32)) dut (.clk, .rst_n, .w_load, .w_in, .x_in, .psum_in, .x_out, .psum_out);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      if (i % 20 == 0) begin
        w_load = 1;
        w = (i == 0) ? -128 : (i == 20) ? 127 : $signed(8'($urandom));
        w_in = 8'(w);
      end else begin
        w_load = 0; w_in = 8'($urandom);  // must be ignored
      end
      @(negedge clk);
      w_load = 0;
      x_in = (i % 7 == 0) ? -8'sd128 : 8'($urandom);
      psum_in = $urandom;
      @(negedge clk);
      check(x_out == x_in, "x passes to the right");
      check(psum_out == psum_in + 32'(longint'(x_in) * w),
            $sformatf("psum %0d expected %0d", psum_out, psum_in + 32'(longint'(x_in) * w)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

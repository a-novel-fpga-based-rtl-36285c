`timescale 1ps / 1fs
// tb_systolic_data_prep: pushes random rows (some not valid) and checks
// that lane k of the output in cycle t equals lane k of the row presented
// in cycle t-k-1, or 0 if that row was not valid, and that out_valid
// follows in_valid by one cycle.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_systolic_data_prep;
  localparam int N = 14, STEPS = 60;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, in_valid = 0, out_valid;
  logic [N-1:0][7:0] in_row, out_lane;
  logic [N-1:0][7:0] rows [STEPS];
  bit vals [STEPS];
  int checks = 0, failures = 0;

  systolic_data_prep #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_row, .out_valid, .out_lane);

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
    for (int t = 0; t < STEPS; t++) begin
      vals[t] = ($urandom_range(0, 3) != 0);
      for (int l = 0; l < N; l++) rows[t][l] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < STEPS; t++) begin
      in_valid = vals[t]; in_row = rows[t];
      @(negedge clk);
      // now the outputs hold the values registered at the last edge
      check(out_valid == vals[t], $sformatf("out_valid at step %0d", t));
      for (int k = 0; k < N; k++) begin
        logic [7:0] e;
        e = (t - k >= 0) ? (vals[t-k] ? rows[t-k][k] : 8'd0) : 8'd0;
        check(out_lane[k] == e, $sformatf("lane %0d at step %0d: %h expected %h", k, t, out_lane[k], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

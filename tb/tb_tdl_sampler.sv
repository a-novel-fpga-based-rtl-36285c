`timescale 1ps / 1fs
// tb_tdl_sampler: drives tap words directly and checks that the code is the
// tap word of two clock edges earlier and that `hit` marks exactly the first
// sample after a rising edge (including one whose first tap is a bubble).
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_tdl_sampler;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] taps, code;
  logic hit;
  int checks = 0, failures = 0, hits = 0;
  logic [N-1:0] hist [3];

  tdl_sampler #(.N_TAPS(N), .HIT_TAPS(4)) dut (.clk, .rst_n, .taps, .code, .hit);

  always #1250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected: code == taps as set two edges earlier; hit when first 4 bits
  // of code become non-zero.
  logic [N-1:0] seq [12] = '{16'h0000, 16'h0000, 16'h0007, 16'hFFFF, 16'hFFFF, 16'h0000,
                              16'h0000, 16'h003E, 16'h00FF, 16'h0000, 16'h0FF0, 16'h0000};
  bit exp_hit [12] = '{0, 0, 1, 0, 0, 0, 0, 1, 0, 0, 0, 0};

  initial begin
    taps = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      @(negedge clk) taps = seq[i];
      if (i >= 2) begin
        check(code == seq[i-2], $sformatf("code %h expected %h", code, seq[i-2]));
        check(hit == exp_hit[i-2], $sformatf("hit %0b expected %0b at step %0d", hit, exp_hit[i-2], i-2));
        hits += int'(hit);
      end
    end
    check(hits == 2, "two events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

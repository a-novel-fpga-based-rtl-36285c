`timescale 1ps / 1fs
// tb_instr_memory: stores a program of random instructions and reads it
// back twice, checking that reading does not consume anything (the same
// program is returned on the second pass) and the one-cycle read latency.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_instr_memory;
  import tdc_pkg::*;
  localparam int D = 32;
  logic clk = 0, we = 0, re = 0;
  logic [$clog2(D)-1:0] waddr, raddr;
  instr_t wdata, rdata;
  instr_t model [D];
  int checks = 0, failures = 0;

  instr_memory #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = $clog2(D)'(a);
      wdata = instr_t'({$urandom, $urandom});
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int a = 0; a < D; a++) begin
        re = 1; raddr = $clog2(D)'(a);
        @(negedge clk);
        check(rdata == model[a], $sformatf("pass %0d instruction %0d", pass, a));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps / 1fs
// tb_io_memory: writes random rows to random addresses, then reads them back
// and checks the registered read (data the cycle after the address) and that
// a read without re keeps the previous output.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_io_memory;
  localparam int N = 14, D = 64;
  logic clk = 0, we = 0, re = 0;
  logic [$clog2(D)-1:0] waddr, raddr;
  logic [N-1:0][7:0] wdata, rdata;
  logic [N-1:0][7:0] model [D];
  bit written [D];
  int checks = 0, failures = 0;

  io_memory #(.N(N), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1; waddr = $clog2(D)'($urandom_range(0, D - 1));
      for (int l = 0; l < N; l++) wdata[l] = 8'($urandom);
      model[waddr] = wdata; written[waddr] = 1;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < D; a++) begin
      if (!written[a]) continue;
      re = 1; raddr = $clog2(D)'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("row %0d", a));
      re = 0; raddr = raddr + 1'b1;
      @(negedge clk);
      check(rdata == model[a], "output held without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps / 1fs
// tb_vector_register_file: overwrites and accumulates random rows into
// random addresses against a model, including negative values, then reads
// every row back (one-cycle read latency).
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_vector_register_file;
  localparam int N = 14, D = 32;
  logic clk = 0, we = 0, acc = 0, re = 0;
  logic [4:0] waddr, raddr;
  logic [N-1:0][31:0] wdata, rdata;
  logic [N-1:0][31:0] model [D];
  bit init [D];
  int checks = 0, failures = 0, n_acc = 0;

  vector_register_file #(.N(N), .ACC_W(32), .DEPTH(D)) dut (.clk, .we, .acc, .waddr, .wdata, .re, .raddr, .rdata);

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
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(0, D - 1));
      acc = init[waddr] && ($urandom_range(0, 2) != 0);
      for (int l = 0; l < N; l++) wdata[l] = $urandom_range(0, 2000) - 1000;
      for (int l = 0; l < N; l++) model[waddr][l] = acc ? model[waddr][l] + wdata[l] : wdata[l];
      init[waddr] = 1;
      n_acc += int'(acc);
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < D; a++) begin
      if (!init[a]) continue;
      re = 1; raddr = 5'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("row %0d", a));
    end
    check(n_acc > 100, "accumulating writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

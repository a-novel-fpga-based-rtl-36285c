`timescale 1ps / 1fs
// tb_vector_preproc: small configuration (N = 4 lanes, 10-bit vectors -> 3
// tiles). Feeds random vectors and checks every I/O-memory write (row
// t*N + n, lane l = bit t*N+l of vector n, zero past bit 9), the write
// count per vector, ready going low during a vector and with a full batch,
// start_exec after N vectors and clear starting a new batch.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_vector_preproc;
  localparam int N = 4, VB = 10, IW = 16, AW = 6, NT = 3;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, in_valid = 0, clear = 0;
  logic [IW-1:0] in_vec;
  logic ready, start_exec, io_we;
  logic [AW-1:0] io_waddr;
  logic [N-1:0][7:0] io_wdata;
  int checks = 0, failures = 0, n_writes = 0;
  logic [N-1:0][7:0] mem [2**AW];
  logic [IW-1:0] sent [N];

  vector_preproc #(.N(N), .VEC_BITS(VB), .IN_W(IW), .IO_AW(AW)) dut (
    .clk, .rst_n, .in_valid, .in_vec, .ready, .clear, .start_exec, .io_we, .io_waddr, .io_wdata);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (io_we) begin mem[io_waddr] <= io_wdata; n_writes++; end

  task automatic batch();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      check(ready && !start_exec, "ready for a vector");
      in_valid = 1; in_vec = IW'($urandom); sent[n] = in_vec;
      @(negedge clk);
      in_valid = 0;
      check(!ready, "not ready while splitting");
      repeat (NT) @(negedge clk);
    end
    @(negedge clk);
    check(start_exec && !ready, "start_exec after N vectors");
    check(n_writes == N * NT, $sformatf("%0d row writes, expected %0d", n_writes, N * NT));
    for (int n = 0; n < N; n++)
      for (int t = 0; t < NT; t++)
        for (int l = 0; l < N; l++) begin
          int b = t * N + l;
          logic [7:0] e = (b < VB) ? {7'd0, sent[n][b]} : 8'd0;
          check(mem[t*N + n][l] == e, $sformatf("vector %0d bit %0d", n, b));
        end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    batch();
    // held while full
    repeat (5) @(negedge clk);
    check(start_exec && !ready, "batch held until clear");
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(!start_exec && ready, "clear empties the batch");
    n_writes = 0;
    batch();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

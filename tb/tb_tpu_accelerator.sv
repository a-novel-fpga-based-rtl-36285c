`timescale 1ps / 1fs
// tb_tpu_accelerator: the whole accelerator on a reduced network (56 raw
// bits -> 20 hidden ReLU neurons -> 1 linear output) with the full 14 x 14
// array. A queue stands in for the CDC FIFO. The test loads the weight image
// and program through the host ports, sends three batches of random vectors
// (two back to back, the program being re-run from its persistent memory)
// and compares every timestamp, in order and with its batch index, with the
// integer reference model of tb_mlp_pkg.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_tpu_accelerator;
  import tdc_pkg::*;
  import tb_mlp_pkg::*;
  localparam int N = 14, IN = 56, HID = 20, IW = 64, SEED = 7, BATCHES = 3;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0;
  logic fifo_empty, fifo_rd_valid = 0, fifo_rd_en;
  logic [IW-1:0] fifo_rd_data;
  logic wm_we = 0, im_we = 0;
  logic [WM_AW-1:0] wm_waddr;
  logic [N-1:0][7:0] wm_wdata;
  logic [IM_AW-1:0] im_waddr;
  instr_t im_wdata;
  logic ts_valid, busy;
  logic [31:0] ts_value;
  logic [3:0] ts_index;
  int checks = 0, failures = 0, n_ts = 0, n_busy_rise = 0;
  logic [IW-1:0] fifo_q[$], sent_q[$];

  tpu_accelerator #(.N(N), .VB(IN), .IN_W(IW)) dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO stand-in: data one cycle after rd_en
  assign fifo_empty = (fifo_q.size() == 0);
  always @(posedge clk) begin
    fifo_rd_valid <= fifo_rd_en;
    if (fifo_rd_en) fifo_rd_data <= fifo_q.pop_front();
  end

  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= busy;
    if (busy && !busy_q) n_busy_rise++;
    if (ts_valid) begin
      logic [FIFO_W-1:0] v;
      int e;
      v = FIFO_W'(sent_q.pop_front());
      e = reference(v, IN, HID, SEED);
      check(int'(ts_index) == n_ts % N, $sformatf("index %0d expected %0d", ts_index, n_ts % N));
      check($signed(ts_value) == e, $sformatf("timestamp %0d: %0d expected %0d", n_ts, $signed(ts_value), e));
      n_ts++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < wm_rows(IN, HID, N); r++) begin
      @(negedge clk);
      wm_we = 1; wm_waddr = WM_AW'(r);
      for (int c = 0; c < N; c++) wm_wdata[c] = wm_lane(r, c, IN, HID, N, SEED);
    end
    for (int p = 0; p < prog_len(IN, HID, N); p++) begin
      @(negedge clk);
      wm_we = 0; im_we = 1; im_waddr = IM_AW'(p); im_wdata = prog(p, IN, HID, N);
    end
    @(negedge clk) im_we = 0;
    check(prog(prog_len(IN, HID, N) - 1, IN, HID, N).op == OP_HALT, "program ends in HALT");
    // two batches at once, then a third one later
    for (int i = 0; i < 2 * N; i++) begin
      logic [IW-1:0] v;
      v = {$urandom, $urandom};
      fifo_q.push_back(v); sent_q.push_back(v);
    end
    wait (n_ts == 2 * N);
    repeat (20) @(negedge clk);
    check(!busy, "idle after two batches");
    for (int i = 0; i < N; i++) begin
      logic [IW-1:0] v;
      v = {$urandom, $urandom};
      fifo_q.push_back(v); sent_q.push_back(v);
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    wait (n_ts == BATCHES * N);
    repeat (20) @(negedge clk);
    check(n_busy_rise == BATCHES, $sformatf("%0d program runs", n_busy_rise));
    check(sent_q.size() == 0, "every vector produced a timestamp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

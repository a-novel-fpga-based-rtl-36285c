`timescale 1ps / 1fs
// tb_control_unit: the control unit alone, with the memories and data path
// replaced by simple responders. It checks
//   * idle FIFO reads: one rd_en per vector, never while empty, never a
//     second one before rd_valid;
//   * start on start_exec and in-order fetch from address 0;
//   * LOADW: weight rows w_addr.. read in 14 consecutive cycles and written
//     to PE rows 0..13 one cycle later;
//   * MATMUL: I/O rows io_addr.. issued, dp_valid one cycle later, each
//     returned result written to VRF rows vrf_addr.. with the acc flag, and
//     no next fetch before all 14 results are back;
//   * ACT: bias row read, then VRF rows with act_in_valid one cycle later,
//     activated rows written to I/O rows io_addr.., timestamps with index;
//   * HALT: clear pulse and return to idle, and the same program again on
//     the next batch.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_control_unit;
  import tdc_pkg::*;
  localparam int N = 14;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0;
  logic fifo_empty, fifo_rd_valid = 0, fifo_rd_en;
  logic pp_ready, pp_start_exec, pp_clear;
  logic im_re; logic [IM_AW-1:0] im_raddr; instr_t im_rdata;
  logic wm_re; logic [WM_AW-1:0] wm_raddr;
  logic sa_w_we; logic [3:0] sa_w_row;
  logic io_re; logic [IO_AW-1:0] io_raddr; logic dp_valid;
  logic sa_y_valid = 0;
  logic vrf_we, vrf_acc, vrf_re; logic [VRF_AW-1:0] vrf_waddr, vrf_raddr;
  logic act_in_valid, act_relu; logic [4:0] act_shift, act_bshift;
  logic act_out_valid = 0, act_io_we; logic [IO_AW-1:0] act_io_waddr;
  logic ts_valid; logic [3:0] ts_index; logic busy;
  int checks = 0, failures = 0, cyc = 0;

  control_unit #(.N(N)) dut (.*);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  instr_t prog [5];
  initial begin
    prog[0] = '0; prog[0].op = OP_LOADW; prog[0].w_addr = 13'd100;
    prog[1] = '0; prog[1].op = OP_MATMUL; prog[1].io_addr = 11'd5; prog[1].vrf_addr = 5'd3; prog[1].acc = 1;
    prog[2] = '0; prog[2].op = OP_ACT; prog[2].vrf_addr = 5'd3; prog[2].io_addr = 11'd40; prog[2].w_addr = 13'd7;
    prog[2].shift = 5'd2; prog[2].bshift = 5'd1; prog[2].relu = 1; prog[2].out = 1;
    prog[3] = '0; prog[3].op = OP_NOP;
    prog[4] = '0; prog[4].op = OP_HALT;
  end
  always @(posedge clk) if (im_re) im_rdata <= prog[im_raddr];

  // ---------------- FIFO and pre-processing model ----------------
  int fifo_words = 0, stored = 0, rd_in_flight = 0, n_clear = 0, words_at_clear = -1;
  assign fifo_empty    = (fifo_words == 0);
  assign pp_ready      = (stored < N);
  assign pp_start_exec = (stored == N);
  always @(posedge clk) begin
    check(!(fifo_rd_en && fifo_empty), "no read while empty");
    check(!(fifo_rd_en && rd_in_flight != 0), "one read in flight");
    fifo_rd_valid <= fifo_rd_en;
    if (fifo_rd_en) begin fifo_words--; rd_in_flight++; end
    if (fifo_rd_valid) begin stored++; rd_in_flight--; end
    if (pp_clear) begin stored = 0; n_clear++; words_at_clear = fifo_words; end
  end

  // ---------------- data path model: records and responds ----------------
  int wm_log[$], wrow_log[$], io_log[$], vrf_w_log[$], vrf_r_log[$], act_w_log[$], ts_log[$];
  int dp_seen = 0, ain_seen = 0, sa_pending = 0;
  bit fetch_while_pending = 0;
  always @(posedge clk) begin
    cyc++;
    if (wm_re) wm_log.push_back(int'(wm_raddr));
    if (sa_w_we) wrow_log.push_back(int'(sa_w_row));
    if (io_re) io_log.push_back(int'(io_raddr));
    if (dp_valid) begin dp_seen++; sa_pending++; end
    if (vrf_we) begin vrf_w_log.push_back(int'(vrf_waddr)); check(vrf_acc, "acc flag passed"); end
    if (vrf_re) vrf_r_log.push_back(int'(vrf_raddr));
    if (act_in_valid) begin
      ain_seen++;
      check(act_shift == 5'd2 && act_bshift == 5'd1 && act_relu, "activation settings");
    end
    if (act_io_we) act_w_log.push_back(int'(act_io_waddr));
    if (ts_valid) ts_log.push_back(int'(ts_index));
    if (im_re && sa_pending > 0) fetch_while_pending = 1;
    // array answers 20 cycles after the last row went in, one row per cycle
    act_out_valid <= act_in_valid;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (sa_pending == N) begin
        repeat (20) @(posedge clk);
        for (int i = 0; i < N; i++) begin
          @(negedge clk) sa_y_valid = 1;
          @(posedge clk) #1 sa_y_valid = 0;
          sa_pending--;
        end
      end
    end
  end

  task automatic run_batch(input int base_clear);
    wm_log = {}; wrow_log = {}; io_log = {}; vrf_w_log = {}; vrf_r_log = {}; act_w_log = {}; ts_log = {};
    fifo_words = N + 3;
    wait (n_clear == base_clear + 1);
    repeat (3) @(posedge clk);
    check(!busy, "idle after HALT");
    check(wm_log.size() == N + 1, $sformatf("%0d weight reads", wm_log.size()));
    for (int i = 0; i < N; i++) check(wm_log[i] == 100 + i, "LOADW row address");
    check(wm_log[N] == 7, "ACT bias row address");
    check(wrow_log.size() == N, "14 PE rows written");
    for (int i = 0; i < N; i++) check(wrow_log[i] == i, "PE row order");
    check(io_log.size() == N, "14 I/O rows issued");
    for (int i = 0; i < N; i++) check(io_log[i] == 5 + i, "MATMUL I/O address");
    check(vrf_w_log.size() == N, "14 VRF writes");
    for (int i = 0; i < N; i++) check(vrf_w_log[i] == 3 + i, "VRF write address");
    check(vrf_r_log.size() == N, "14 VRF reads");
    for (int i = 0; i < N; i++) check(vrf_r_log[i] == 3 + i, "VRF read address");
    check(act_w_log.size() == N, "14 activated rows");
    for (int i = 0; i < N; i++) check(act_w_log[i] == 40 + i, "activation write address");
    check(ts_log.size() == N, "14 timestamps");
    for (int i = 0; i < N; i++) check(ts_log[i] == i, "timestamp index");
    check(!fetch_while_pending, "no fetch while array results outstanding");
  endtask

  initial begin
    fifo_words = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!busy && !fifo_rd_en, "idle with an empty FIFO");
    run_batch(0);
    check(words_at_clear == 3, "exactly 14 words read for the batch");
    run_batch(1);
    check(dp_seen == 2 * N && ain_seen == 2 * N, "dp_valid and act_in_valid counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

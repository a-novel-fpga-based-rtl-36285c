`timescale 1ps / 1fs
// tb_tdc_ml_full: the converter with every parameter at its default (464-tap
// lines, 12-bit counter, 1024 x 2048 FIFO, 14 x 14 array) running the
// 940 -> 64 -> 1 network on two batches of 14 measurements: the 900 ps
// example interval repeated, then intervals stepping from 50 ps to 1500 ps
// in 50 ps-multiples plus a few long ones. Every raw vector is decoded with
// the plain ones-count rule and checked against the applied interval
// (+/-40 ps), and every timestamp is checked against the integer network
// model applied to the raw vector.
// The clocks, all sizes, the 940 -> 64 -> 1 network shape and the 900 ps
// example interval come from the document; the hashed weights (no trained
// weights are available) and the other intervals are this testbench's own.
module tb_tdc_ml_full;
  import tdc_pkg::*;
  import tb_mlp_pkg::*;
  localparam int  N = SA_N, HID = 64, SEED = 5;
  localparam real TCLK = 2500.0, LSB = 6.03;

  logic clk_tdc = 0, clk_sys = 0, rst_tdc_n, rst_sys_n, s1 = 0, s2 = 0;
  logic wm_we = 0, im_we = 0;
  logic [WM_AW-1:0] wm_waddr;
  logic [N-1:0][7:0] wm_wdata;
  logic [IM_AW-1:0] im_waddr;
  instr_t im_wdata;
  logic ts_valid, busy, fifo_wr_ack, fifo_overflow, fifo_full, meas_timeout;
  logic [31:0] ts_value;
  logic [3:0] ts_index;
  int checks = 0, failures = 0;
  int n_written = 0, n_overflow = 0, n_timeout = 0, n_zero = 0, n_bubble = 0, n_runs = 0,
      n_ts = 0, n_buffered_while_busy = 0, busy_cycles = 0, busy_first = 0;
  real dt_q[$];
  logic [FIFO_W-1:0] vec_q[$];

  tdc_ml_top dut (.*);

  always #1250 clk_tdc = ~clk_tdc;
  always #2500 clk_sys = ~clk_sys;
  initial begin
    rst_tdc_n = 1; rst_sys_n = 1;
    #1 rst_tdc_n = 0; rst_sys_n = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("written %0d overflow %0d timeout %0d", n_written, n_overflow, n_timeout);
    $display("watchdog expired: runs %0d ts %0d state %0d stored %0d empty %0b rd_wait %0b", n_runs, n_ts, dut.u_acc.u_cu.state, dut.u_acc.u_pp.n_stored, dut.fifo_empty, dut.u_acc.u_cu.rd_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(input logic [N_TAPS-1:0] v);
    int c = 0;
    for (int i = 0; i < N_TAPS; i++) c += int'(v[i]);
    return c;
  endfunction
  function automatic bit has_bubble(input logic [N_TAPS-1:0] v);
    int top = -1;
    for (int i = 0; i < N_TAPS; i++) if (v[i]) top = i;
    for (int i = 0; i < top; i++) if (!v[i]) return 1;
    return 0;
  endfunction

  // raw vectors leaving the front end
  always @(posedge clk_tdc) begin
    if (dut.vec_valid) begin
      real dt, t;
      int cnt;
      dt = dt_q.pop_front();
      cnt = int'(dut.vec[CNT_W-1:0]);
      t = ones(dut.vec[CNT_W +: N_TAPS]) * LSB + cnt * TCLK - ones(dut.vec[CNT_W + N_TAPS +: N_TAPS]) * LSB;
      if (!dut.fifo_full) begin
        check(t > dt - 40.0 && t < dt + 40.0, $sformatf("raw vector decodes to %0.1f ps for %0.1f ps", t, dt));
        vec_q.push_back(FIFO_W'(dut.vec));
        if (cnt == 0) n_zero++;
        if (has_bubble(dut.vec[CNT_W +: N_TAPS]) || has_bubble(dut.vec[CNT_W + N_TAPS +: N_TAPS])) n_bubble++;
      end
    end
    if (fifo_wr_ack) n_written++;
    if (fifo_overflow) n_overflow++;
    if (meas_timeout) n_timeout++;
    if (fifo_wr_ack && busy) n_buffered_while_busy++;
  end

  // timestamps
  logic busy_q = 0;
  always @(posedge clk_sys) begin
    busy_q <= busy;
    if (busy && !busy_q) n_runs++;
    if (busy) busy_cycles++;
    if (busy && n_runs == 1) busy_first++;
    if (ts_valid) begin
      int e;
      e = reference(vec_q.pop_front(), VEC_BITS, HID, SEED);
      check(int'(ts_index) == n_ts % N, "timestamp index");
      check($signed(ts_value) == e, $sformatf("timestamp %0d: %0d expected %0d", n_ts, $signed(ts_value), e));
      n_ts++;
    end
  end

  task automatic measure(input real dt);
    @(posedge clk_tdc);
    #($urandom_range(1, 2499));
    s1 = 1;
    dt_q.push_back(dt);
    #(dt);
    s2 = 1;
    repeat (3) @(posedge clk_tdc);
    s1 = 0; s2 = 0;
    repeat (4) @(posedge clk_tdc);
  endtask

  initial begin
    repeat (3) @(negedge clk_sys);
    rst_tdc_n = 1; rst_sys_n = 1;
    for (int r = 0; r < wm_rows(VEC_BITS, HID, N); r++) begin
      @(negedge clk_sys);
      wm_we = 1; wm_waddr = WM_AW'(r);
      for (int c = 0; c < N; c++) wm_wdata[c] = wm_lane(r, c, VEC_BITS, HID, N, SEED);
    end
    for (int p = 0; p < prog_len(VEC_BITS, HID, N); p++) begin
      @(negedge clk_sys);
      wm_we = 0; im_we = 1; im_waddr = IM_AW'(p); im_wdata = prog(p, VEC_BITS, HID, N);
    end
    @(negedge clk_sys) im_we = 0;

    for (int i = 0; i < N; i++) measure(900.0);
    for (int i = 0; i < N; i++) measure((i < 10) ? 50.0 + 150.0 * i : real'($urandom_range(2000, 1000000)));
    wait (n_ts == 2 * N);
    repeat (50) @(posedge clk_sys);

    check(n_written == 2 * N, $sformatf("%0d vectors written to the FIFO", n_written));
    check(n_overflow == 0 && n_timeout == 0, "no overflow, no timeout");
    check(n_runs == 2, $sformatf("%0d program runs", n_runs));
    check(vec_q.size() == 0, "every stored vector produced a timestamp");
    $display("written %0d zero-count %0d bubbled %0d runs %0d", n_written, n_zero, n_bubble, n_runs);
    check(busy_cycles == 2 * busy_first, "both batches take the same number of cycles");
    $display("busy %0d cycles per batch (%0.1f us at 200 MHz)", busy_first, busy_first * 0.005);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps / 1fs
// tb_tdc_ml_top: end-to-end test of the whole converter with the published
// sizes except a 16-entry FIFO, so that a burst can overflow it.
//
// Loads the 940 -> 64 -> 1 network (hash weights from tb_mlp_pkg) and its
// program, then applies intervals between s1 and s2 with a 400 MHz
// measurement clock and a 200 MHz accelerator clock:
//   * a first batch of 14 intervals, including one with s1 and s2 in the
//     same clock cycle;
//   * while that batch is computed, a burst of 20 more: the FIFO buffers 16
//     and drops 4 (overflow);
//   * an s1 with no s2 (timeout);
//   * once the second batch has been taken from the FIFO, 12 more
//     intervals, completing the third batch.
// Every raw vector that enters the FIFO is decoded here with the plain
// ones-count rule and checked against the applied interval (+/-40 ps), and
// every timestamp leaving the accelerator is checked, in order, against the
// integer network model applied to that vector. Each mechanism is counted
// and must have happened.
// The clocks, the 940-bit vector and the 14-vector batch come from the
// document; the reduced FIFO depth, the hashed weights and the stimulus are
// this testbench's own.
module tb_tdc_ml_top;
  import tdc_pkg::*;
  import tb_mlp_pkg::*;
  localparam int  N = SA_N, HID = 64, SEED = 3, FD = 16;
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
      n_ts = 0, n_buffered_while_busy = 0;
  real dt_q[$];
  logic [FIFO_W-1:0] vec_q[$];

  tdc_ml_top #(.FIFO_DEPTH(FD)) dut (.*);

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

    measure(50.0);                                     // inside one clock cycle
    for (int i = 1; i < N; i++) measure(real'($urandom_range(50, 30000)));
    $display("batch 1 sent at %0t", $time);
    wait (busy);
    for (int i = 0; i < FD + 4; i++) measure(real'($urandom_range(50, 3000)));  // burst
    // s1 with no s2
    @(posedge clk_tdc) s1 = 1;
    repeat (4100) @(posedge clk_tdc);
    s1 = 0;
    repeat (4) @(posedge clk_tdc);
    $display("burst done at %0t, written %0d overflow %0d", $time, n_written, n_overflow);
    wait (n_runs == 2);   // second batch taken from the FIFO: two vectors remain
    for (int i = 0; i < 12; i++) measure(real'($urandom_range(50, 1000000)) * ((i == 11) ? 1.0 : 0.01));
    $display("all sent at %0t, ts %0d", $time, n_ts);
    wait (n_ts == 3 * N);
    repeat (50) @(posedge clk_sys);

    check(n_written == 3 * N, $sformatf("%0d vectors written to the FIFO", n_written));
    check(n_overflow == 4, $sformatf("%0d overflows, expected 4", n_overflow));
    check(n_timeout == 1, "one timeout");
    check(n_zero >= 1, "an interval inside one clock cycle");
    check(n_bubble >= 1, "bubbled codes reach the network");
    check(n_runs == 3, $sformatf("%0d program runs", n_runs));
    check(n_buffered_while_busy >= 1, "vectors buffered while the accelerator was busy");
    check(vec_q.size() == 0, "every stored vector produced a timestamp");
    $display("written %0d overflow %0d timeout %0d zero-count %0d bubbled %0d runs %0d buffered-while-busy %0d",
             n_written, n_overflow, n_timeout, n_zero, n_bubble, n_runs, n_buffered_while_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

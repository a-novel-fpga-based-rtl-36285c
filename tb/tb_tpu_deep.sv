`timescale 1ps / 1fs
// tb_tpu_deep: the accelerator running a deeper fully connected network,
// 56 raw bits -> 28 ReLU -> 20 ReLU -> 1 linear output, with the full 14 x 14
// array. It shows that depth is only a matter of program and weight image:
// each hidden layer is read back from the I/O memory rows the previous ACT
// wrote. Layer l's weight tile (o,t) sits at WB(l) + (o*T(l) + t)*14 (row r =
// input t*14+r, lane c = output o*14+c), followed by its bias rows; layer l's
// outputs go to the I/O rows right after its inputs, tile h of vector n at
// base + h*14 + n. Two batches of random vectors; every timestamp is compared
// with an integer model of the same network computed here.
// A deeper fully connected network is one of the workloads the document
// evaluates (there 940-128-128-64-64-64-1, which needs more weight memory
// than built); the reduced sizes, hashed weights and scales are this
// testbench's own.
module tb_tpu_deep;
  import tdc_pkg::*;
  import tb_mlp_pkg::hash8;
  import tb_mlp_pkg::mk;
  localparam int N = 14, IW = 64, SEED = 11, K = 3;
  localparam int S [K+1] = '{56, 28, 20, 1};   // layer widths
  localparam int SH[K]   = '{2, 4, 0};         // requantisation shifts
  localparam int BS[K]   = '{0, 1, 2};         // bias shifts

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
  int checks = 0, failures = 0, n_ts = 0;
  int seen[int];
  logic [IW-1:0] fifo_q[$], sent_q[$];

  tpu_accelerator #(.N(N), .VB(S[0]), .IN_W(IW)) dut (.*);

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

  // ---------------- network and layout ----------------
  function automatic int tl(input int n); return (n + N - 1) / N; endfunction
  function automatic int w(input int l, input int i, input int j);
    if (i >= S[l] || j >= S[l+1]) return 0;
    return hash8(10 + l, i, j, SEED) / ((l == 0) ? 8 : 16);
  endfunction
  function automatic int b(input int l, input int j);
    if (j >= S[l+1]) return 0;
    return hash8(20 + l, j, 0, SEED);
  endfunction
  // first weight row and first bias row of layer l
  function automatic int wb(input int l);
    int a;
    a = 0;
    for (int k = 0; k < l; k++) a += tl(S[k+1]) * tl(S[k]) * N + tl(S[k+1]);
    return a;
  endfunction
  function automatic int bb(input int l);
    return wb(l) + tl(S[l+1]) * tl(S[l]) * N;
  endfunction
  // first I/O row of layer l's inputs
  function automatic int ib(input int l);
    int a;
    a = 0;
    for (int k = 0; k < l; k++) a += tl(S[k]) * N;
    return a;
  endfunction
  function automatic logic [7:0] lane(input int row, input int c);
    for (int l = 0; l < K; l++) begin
      if (row >= wb(l) && row < bb(l)) begin
        int tile, r;
        tile = (row - wb(l)) / N; r = (row - wb(l)) % N;
        return 8'(w(l, (tile % tl(S[l])) * N + r, (tile / tl(S[l])) * N + c));
      end
      if (row >= bb(l) && row < bb(l) + tl(S[l+1]))
        return 8'(b(l, (row - bb(l)) * N + c));
    end
    return 8'd0;
  endfunction
  function automatic int n_rows(); return wb(K); endfunction
  function automatic instr_t prog(input int pc);
    int p;
    p = 0;
    for (int l = 0; l < K; l++)
      for (int o = 0; o < tl(S[l+1]); o++) begin
        for (int t = 0; t < tl(S[l]); t++) begin
          if (pc == p)     return mk(OP_LOADW, wb(l) + (o * tl(S[l]) + t) * N, 0, 0, 0, 0, 0, 0, 0);
          if (pc == p + 1) return mk(OP_MATMUL, 0, ib(l) + t * N, 0, t != 0, 0, 0, 0, 0);
          p += 2;
        end
        if (pc == p) return mk(OP_ACT, bb(l) + o, ib(l + 1) + o * N, 0, 0, l < K - 1, l == K - 1, SH[l], BS[l]);
        p += 1;
      end
    return mk(OP_HALT, 0, 0, 0, 0, 0, 0, 0, 0);
  endfunction
  function automatic int prog_len();
    int p;
    p = 1;
    for (int l = 0; l < K; l++) p += tl(S[l+1]) * (2 * tl(S[l]) + 1);
    return p;
  endfunction
  function automatic int reference(input logic [IW-1:0] v);
    longint x[64], y[64];
    for (int i = 0; i < S[0]; i++) x[i] = longint'(v[i]);
    for (int l = 0; l < K; l++) begin
      for (int j = 0; j < S[l+1]; j++) begin
        y[j] = longint'(b(l, j)) <<< BS[l];
        for (int i = 0; i < S[l]; i++) y[j] += x[i] * longint'(w(l, i, j));
        if (l < K - 1) begin
          y[j] = y[j] >>> SH[l];
          if (y[j] < 0)   y[j] = 0;
          if (y[j] > 127) y[j] = 127;
        end
      end
      for (int j = 0; j < S[l+1]; j++) x[j] = y[j];
    end
    return int'(x[0]);
  endfunction

  // ---------------- FIFO stand-in and result check ----------------
  assign fifo_empty = (fifo_q.size() == 0);
  always @(posedge clk) begin
    fifo_rd_valid <= fifo_rd_en;
    if (fifo_rd_en) fifo_rd_data <= fifo_q.pop_front();
  end

  always @(posedge clk) begin
    if (ts_valid) begin
      int e;
      e = reference(sent_q.pop_front());
      seen[e] = 1;
      check(int'(ts_index) == n_ts % N, "timestamp index");
      check($signed(ts_value) == e, $sformatf("timestamp %0d: %0d expected %0d", n_ts, $signed(ts_value), e));
      n_ts++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < n_rows(); r++) begin
      @(negedge clk);
      wm_we = 1; wm_waddr = WM_AW'(r);
      for (int c = 0; c < N; c++) wm_wdata[c] = lane(r, c);
    end
    for (int p = 0; p < prog_len(); p++) begin
      @(negedge clk);
      wm_we = 0; im_we = 1; im_waddr = IM_AW'(p); im_wdata = prog(p);
    end
    @(negedge clk) im_we = 0;
    check(prog(prog_len() - 1).op == OP_HALT && prog(prog_len() - 2).op == OP_ACT, "program ends in ACT, HALT");
    for (int i = 0; i < 2 * N; i++) begin
      logic [IW-1:0] v;
      v = {$urandom, $urandom};
      fifo_q.push_back(v); sent_q.push_back(v);
    end
    wait (n_ts == 2 * N);
    repeat (20) @(negedge clk);
    check(!busy, "idle after two batches");
    check(sent_q.size() == 0, "every vector produced a timestamp");
    // a network whose hidden layers died would give one constant output
    check(seen.num() > N, $sformatf("%0d distinct outputs for %0d vectors", seen.num(), 2 * N));
    $display("%0d weight rows, %0d instructions", n_rows(), prog_len());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

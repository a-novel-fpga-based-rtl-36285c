`timescale 1ps / 1fs
// tb_tdc_front_end: full-length front end (two 464-tap lines, 12-bit
// counter, 400 MHz clock). For a set of intervals between s1 and s2 it
// decodes the emitted raw vector with the plain ones-count rule
//   T = ones(DL1)*6.03 + count*2500 - ones(DL2)*6.03
// and checks it against the applied interval (+/-40 ps: the model's uneven
// taps and skew are not calibrated out here). It also checks T1 and T3
// against the known clock phase, covers an S2 in the same clock cycle as S1
// (count 0) and an S1 without S2 (timeout after 4096 cycles).
// The 400 MHz clock, 464 taps, 12-bit counter and the 6.03 ps mean tap delay
// used to decode come from the document; the intervals and the +/-40 ps
// tolerance are this testbench's own.
module tb_tdc_front_end;
  localparam int  N = 464, CW = 12, VB = 2 * N + CW;
  localparam real TCLK = 2500.0, LSB = 6.03;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, s1 = 0, s2 = 0;
  logic vec_valid, timeout;
  logic [VB-1:0] vec;
  int checks = 0, failures = 0, n_zero_count = 0, n_timeouts = 0, n_bubbles = 0;

  tdc_front_end #(.N_TAPS(N), .CNT_W(CW)) dut (.clk, .rst_n, .s1, .s2, .vec_valid, .vec, .timeout);

  always #1250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int ones(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction
  function automatic bit has_bubble(input logic [N-1:0] v);
    int top = -1;
    for (int i = 0; i < N; i++) if (v[i]) top = i;
    for (int i = 0; i < top; i++) if (!v[i]) return 1;
    return 0;
  endfunction

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One measurement: s1 at absolute time t1 (ps), s2 at t1 + dt.
  task automatic measure(input real t1, input real dt);
    real t2, e1, e3, t_meas, t1_meas, t3_meas;
    logic [N-1:0] c1, c2;
    int cnt;
    #(t1 - $realtime);
    s1 = 1;
    #(dt);
    s2 = 1;
    t2 = t1 + dt;
    wait (vec_valid === 1'b1);
    cnt = int'(vec[CW-1:0]);
    c1  = vec[CW +: N];
    c2  = vec[CW + N +: N];
    if (has_bubble(c1) || has_bubble(c2)) n_bubbles++;
    e1 = $ceil((t1 - TCLK / 2) / TCLK) * TCLK + TCLK / 2;  // edge that sampled s1
    e3 = $ceil((t2 - TCLK / 2) / TCLK) * TCLK + TCLK / 2;
    t1_meas = ones(c1) * LSB;
    t3_meas = ones(c2) * LSB;
    t_meas  = t1_meas + cnt * TCLK - t3_meas;
    if (cnt == 0) n_zero_count++;
    check(cnt == int'((e3 - e1) / TCLK), $sformatf("count %0d expected %0d", cnt, int'((e3 - e1) / TCLK)));
    check(t1_meas > (e1 - t1) - 40.0 && t1_meas < (e1 - t1) + 40.0,
          $sformatf("T1 %0.1f expected %0.1f", t1_meas, e1 - t1));
    check(t_meas > dt - 40.0 && t_meas < dt + 40.0,
          $sformatf("T %0.1f ps for an interval of %0.1f ps", t_meas, dt));
    @(posedge clk);
    s1 = 0; s2 = 0;
    repeat (4) @(posedge clk);
  endtask

  always @(posedge clk) if (timeout) n_timeouts++;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    measure($realtime + 1000.0, 900.0);
    measure($realtime + 300.0,  50.0);     // s1 and s2 in the same clock cycle
    measure($realtime + 2400.0, 50.0);     // s1 just before an edge, s2 just after
    measure($realtime + 1777.0, 1500.0);
    measure($realtime + 123.0,  12345.0);
    measure($realtime + 2000.0, 1000000.0); // 1 us, the required range
    for (int i = 0; i < 6; i++)
      measure($realtime + real'($urandom_range(0, 2499)), real'($urandom_range(50, 20000)));
    // S1 with no S2: dropped after 4096 cycles
    #1000 s1 = 1;
    repeat (4100) @(posedge clk);
    s1 = 0;
    check(n_timeouts == 1, "timeout reported once");
    check(n_zero_count >= 1, "an interval inside one clock cycle was measured");
    check(n_bubbles >= 1, "bubbled codes were passed through unchanged");
    repeat (6) @(posedge clk);
    measure($realtime + 500.0, 700.0);      // works again after the timeout
    $display("zero counts %0d, timeouts %0d, bubbled vectors %0d", n_zero_count, n_timeouts, n_bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps / 1fs
// tdc_front_end: one TDC channel in the 400 MHz measurement clock domain.
//
// The interval T between a rising edge on s1 and a rising edge on s2 is
// measured as T = T1 + T2 - T3:
//   * DL1 starts on s1 and is stopped (sampled) by the next clock edge: its
//     thermometer code encodes T1, the time from s1 to that edge;
//   * DL2 does the same for s2, giving T3;
//   * the coarse counter counts T2, the clock cycles between those edges.
// Each line is its own carry chain with its own register bank, so neither
// input passes through a multiplexer before it is sampled.
//
// No decoding is done here. When the S2 event closes a measurement the raw
// material is emitted as one VEC_BITS-wide word for the neural network:
//   vec = { DL2 code (N_TAPS), DL1 code (N_TAPS), coarse count (CNT_W) }
// with the count in the low bits. The order of the three fields is this
// design's choice. Because both codes and the counter are driven by the same
// sampled events, counter and delay lines always refer to the same clock
// edges, whatever the routing of s1 and s2.
//
// A measurement whose S2 never arrives within 2^CNT_W cycles is dropped and
// reported on `timeout`.
//
// Timing: vec_valid pulses one cycle after the counter's done, three cycles
// after the clock edge that sampled S2.
// Two delay lines, the 12-bit counter and the 940-bit vector follow the
// document; event detection, the zero-count and timeout rules and the bit
// order of the vector are this design's own.
module tdc_front_end #(
  parameter int N_TAPS   = 464,
  parameter int CNT_W    = 12,
  parameter int VEC_BITS = 2 * N_TAPS + CNT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s1,
  input  logic                s2,
  output logic                vec_valid,
  output logic [VEC_BITS-1:0] vec,
  output logic                timeout
);

  logic [N_TAPS-1:0] taps1, taps2, code1, code2, code1_hold, code2_hold;
  logic              hit1, hit2, cnt_done, cnt_running;
  logic [CNT_W-1:0]  count;

  tdl_carry_chain #(.N_TAPS(N_TAPS), .SEED(1)) u_dl1 (.start(s1), .taps(taps1));
  tdl_carry_chain #(.N_TAPS(N_TAPS), .SEED(2)) u_dl2 (.start(s2), .taps(taps2));

  tdl_sampler #(.N_TAPS(N_TAPS)) u_smp1 (.clk, .rst_n, .taps(taps1), .code(code1), .hit(hit1));
  tdl_sampler #(.N_TAPS(N_TAPS)) u_smp2 (.clk, .rst_n, .taps(taps2), .code(code2), .hit(hit2));

  // S2 only counts once S1 has started the measurement (or together with it).
  logic stop_ok;
  assign stop_ok = hit2 && (cnt_running || hit1);

  coarse_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .start  (hit1),
    .stop   (stop_ok),
    .count  (count),
    .done   (cnt_done),
    .timeout(timeout),
    .running(cnt_running)
  );

  // Keep the DL1 code of the S1 edge and the DL2 code of the S2 edge.
  always_ff @(posedge clk) begin
    if (hit1 && !cnt_running) code1_hold <= code1;
    if (stop_ok)              code2_hold <= code2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vec_valid <= 1'b0;
    else        vec_valid <= cnt_done;
  end

  always_ff @(posedge clk) begin
    if (cnt_done) vec <= {code2_hold, code1_hold, count};
  end

endmodule

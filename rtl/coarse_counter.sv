`timescale 1ps / 1fs
// coarse_counter: the synchronous counter that measures T2, the whole clock
// cycles between the edge that sampled S1 and the edge that sampled S2.
//
// `start` (the S1 event) clears the count and starts it; every following
// cycle adds one; `stop` (the S2 event) ends the measurement and presents
// the count for one cycle with `done`. A stop in the same cycle as the start
// gives 0. If no stop comes before the count would pass its maximum, the
// measurement is abandoned and `timeout` pulses. A stop without a preceding
// start is ignored, as is a second start while counting.
//
// The counter width (12 bits, 10.24 us at 400 MHz, above the required
// 1 us range) is the document's; start/stop control and timeout are this
// design's choices. Timing: `done` and `count` are registered, one cycle
// after `stop`.
module coarse_counter #(
  parameter int CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  output logic [CNT_W-1:0] count,
  output logic             done,
  output logic             timeout,
  output logic             running
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cnt     <= '0;
      count   <= '0;
      done    <= 1'b0;
      timeout <= 1'b0;
    end else begin
      done    <= 1'b0;
      timeout <= 1'b0;
      if (!running) begin
        if (start && stop) begin
          count <= '0;
          done  <= 1'b1;
        end else if (start) begin
          running <= 1'b1;
          cnt     <= CNT_W'(1);
        end
      end else if (stop) begin
        running <= 1'b0;
        count   <= cnt;
        done    <= 1'b1;
      end else if (cnt == '1) begin
        running <= 1'b0;
        timeout <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule

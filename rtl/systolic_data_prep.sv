`timescale 1ps / 1fs
// systolic_data_prep: skews an input row for the systolic array.
//
// In a weight-stationary array the value for row k must meet the partial sum
// coming down from row k-1, which is k cycles behind row 0. Lane k of each
// incoming row is therefore delayed by k+1 register stages (lane 0 by one).
// Rows that are not valid enter as zeros. out_valid is in_valid delayed like
// lane 0. Timing: lane k of a row presented in cycle t leaves in cycle t+k+1.
// The document names this stage only; the diagonal skew is the usual input
// staging of such an array and the details are this design's own.
module systolic_data_prep #(
  parameter int N = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N-1:0][7:0] in_row,
  output logic              out_valid,
  output logic [N-1:0][7:0] out_lane
);

  for (genvar k = 0; k < N; k++) begin : g_lane
    logic [7:0] pipe [k+1];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s <= k; s++) pipe[s] <= '0;
      end else begin
        pipe[0] <= in_valid ? in_row[k] : 8'd0;
        for (int s = 1; s <= k; s++) pipe[s] <= pipe[s-1];
      end
    end
    assign out_lane[k] = pipe[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule

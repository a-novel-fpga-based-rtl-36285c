`timescale 1ps / 1fs
// systolic_array: N x N weight-stationary grid of sa_pe cells with output
// de-skew.
//
// Weights: a tile is loaded one row per cycle (w_we, w_row, w_data), row r
// holding the weights of input r toward the N outputs (column c = output c).
// The weights then stay in the PEs while any number of input rows stream
// through.
//
// Data: lane r of the skewed input (see systolic_data_prep) enters row r from
// the left and moves one PE to the right per cycle; partial sums move one PE
// down per cycle, so column c accumulates sum_r x[r] * w[r][c] and leaves the
// bottom of the column c cycles after column 0. A triangular bank of
// registers delays column c by N-1-c cycles, so each result row leaves
// aligned, with y_valid.
//
// Timing: the result for the input row whose lane 0 is presented in cycle t
// (with in_valid) leaves in cycle t + 2N - 1. One row per cycle.
// The 14 x 14 size, weight-stationary operation and column-wise partial sums
// follow the document; row-by-row weight loading and the output de-skew are
// this design's own.
module systolic_array #(
  parameter int N     = 14,
  parameter int ACC_W = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        w_we,
  input  logic [$clog2(N)-1:0]        w_row,
  input  logic [N-1:0][7:0]           w_data,
  input  logic                        in_valid,
  input  logic [N-1:0][7:0]           x_lane,
  output logic                        y_valid,
  output logic [N-1:0][ACC_W-1:0]     y_row
);

  logic [7:0]       xh [N][N+1];   // horizontal input links
  logic [ACC_W-1:0] pv [N+1][N];   // vertical partial-sum links

  for (genvar r = 0; r < N; r++) begin : g_row
    assign xh[r][0] = x_lane[r];
    for (genvar c = 0; c < N; c++) begin : g_col
      sa_pe #(.ACC_W(ACC_W)) u_pe (
        .clk, .rst_n,
        .w_load  (w_we && (w_row == $clog2(N)'(r))),
        .w_in    (w_data[c]),
        .x_in    (xh[r][c]),
        .psum_in (pv[r][c]),
        .x_out   (xh[r][c+1]),
        .psum_out(pv[r+1][c])
      );
    end
  end

  for (genvar c = 0; c < N; c++) begin : g_top
    assign pv[0][c] = '0;
  end

  // De-skew: column c waits N-1-c cycles.
  for (genvar c = 0; c < N; c++) begin : g_deskew
    if (c == N - 1) begin : g_none
      assign y_row[c] = pv[N][c];
    end else begin : g_dly
      logic [ACC_W-1:0] d [N-1-c];
      always_ff @(posedge clk) begin
        d[0] <= pv[N][c];
        for (int s = 1; s < N - 1 - c; s++) d[s] <= d[s-1];
      end
      assign y_row[c] = d[N-2-c];
    end
  end

  // Valid: 2N-1 cycles from lane 0 entering to the aligned result.
  logic [2*N-2:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2*N-3:0], in_valid};
  end
  assign y_valid = vpipe[2*N-2];

endmodule

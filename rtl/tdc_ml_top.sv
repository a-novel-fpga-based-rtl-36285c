`timescale 1ps / 1fs
// tdc_ml_top: single-channel FPGA time-to-digital converter whose raw output
// is turned into a timestamp by an on-chip neural network.
//
// Two clock domains meet only at the CDC FIFO:
//   clk_tdc (400 MHz): tdc_front_end measures the interval between rising
//     edges on s1 and s2 with two tapped delay lines and a 12-bit coarse
//     counter and writes the raw 940-bit vector, zero-padded to 1024 bits,
//     into the FIFO. A measurement arriving while the FIFO is full is lost
//     and flagged on fifo_overflow.
//   clk_sys (200 MHz): tpu_accelerator reads the FIFO, gathers batches of 14
//     vectors and runs the stored network program on each batch, producing
//     one timestamp per measurement on ts_valid / ts_value (ts_index = slot
//     in the batch, in arrival order).
// Weights and program are loaded through the wm_* and im_* ports, in the
// clk_sys domain, before measurements are processed.
// Status outputs: fifo_wr_ack (a vector entered the FIFO, clk_tdc domain),
// fifo_overflow and fifo_full (clk_tdc), meas_timeout (an S1 without S2 within 4096 cycles,
// clk_tdc), busy (the accelerator is running a batch, clk_sys).
// The two clock domains, the FIFO as their only crossing, the sizes (464
// taps, 12-bit counter, 1024 x 2048 FIFO, 14 x 14 array) and the persistent
// program follow the document; the host load ports, the timestamp interface
// and the per-domain resets are this design's own. rst_sys_n also disables
// the accelerator's assertions, which lint reports as a reset used both
// synchronously and asynchronously.
module tdc_ml_top #(
  parameter int N_TAPS     = tdc_pkg::N_TAPS,
  parameter int CNT_W      = tdc_pkg::CNT_W,
  parameter int FIFO_W     = tdc_pkg::FIFO_W,
  parameter int FIFO_DEPTH = tdc_pkg::FIFO_DEPTH,
  parameter int SA_N       = tdc_pkg::SA_N
) (
  input  logic                    clk_tdc,
  input  logic                    rst_tdc_n,
  input  logic                    clk_sys,
  input  logic                    rst_sys_n,
  input  logic                    s1,
  input  logic                    s2,
  // host loading, clk_sys domain
  input  logic                    wm_we,
  input  logic [tdc_pkg::WM_AW-1:0]        wm_waddr,
  input  logic [SA_N-1:0][7:0]    wm_wdata,
  input  logic                    im_we,
  input  logic [tdc_pkg::IM_AW-1:0]        im_waddr,
  input  tdc_pkg::instr_t                  im_wdata,
  // results, clk_sys domain
  output logic                    ts_valid,
  output logic [tdc_pkg::ACC_W-1:0]        ts_value,
  output logic [$clog2(SA_N)-1:0] ts_index,
  output logic                    busy,
  // status, clk_tdc domain
  output logic                    fifo_wr_ack,
  output logic                    fifo_overflow,
  output logic                    fifo_full,
  output logic                    meas_timeout
);

  localparam int VB = 2 * N_TAPS + CNT_W;

  logic          vec_valid;
  logic [VB-1:0] vec;
  logic          fifo_empty, fifo_rd_en, fifo_rd_valid;
  logic [FIFO_W-1:0] fifo_rd_data;

  tdc_front_end #(.N_TAPS(N_TAPS), .CNT_W(CNT_W)) u_tdc (
    .clk      (clk_tdc),
    .rst_n    (rst_tdc_n),
    .s1, .s2,
    .vec_valid(vec_valid),
    .vec      (vec),
    .timeout  (meas_timeout)
  );

  cdc_fifo #(.WIDTH(FIFO_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk  (clk_tdc),
    .wr_rst_n(rst_tdc_n),
    .wr_en   (vec_valid),
    .wr_data (FIFO_W'(vec)),
    .full    (fifo_full),
    .wr_ack  (fifo_wr_ack),
    .overflow(fifo_overflow),
    .rd_clk  (clk_sys),
    .rd_rst_n(rst_sys_n),
    .rd_en   (fifo_rd_en),
    .rd_data (fifo_rd_data),
    .rd_valid(fifo_rd_valid),
    .empty   (fifo_empty)
  );

  tpu_accelerator #(.N(SA_N), .VB(VB), .IN_W(FIFO_W)) u_acc (
    .clk          (clk_sys),
    .rst_n        (rst_sys_n),
    .fifo_empty, .fifo_rd_valid, .fifo_rd_data, .fifo_rd_en,
    .wm_we, .wm_waddr, .wm_wdata,
    .im_we, .im_waddr, .im_wdata,
    .ts_valid, .ts_value, .ts_index,
    .busy
  );

endmodule

`timescale 1ps / 1fs
// io_memory: the accelerator's input/output (unified) buffer.
//
// Each row holds N int8 values: one tile of one vector. It holds the input
// tiles written by vector pre-processing and the activations written back by
// the activation unit for the next layer, so every tile can be read as many
// times as the weight tiling needs. One write port and one read port; the
// read is registered (data the cycle after re_addr is presented with re).
// The depth (2048 rows, enough for a 14-vector batch of 68 input tiles plus
// the hidden layer) is this design's choice.
module io_memory #(
  parameter int N     = 14,
  parameter int DEPTH = 2048,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [N-1:0][7:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [N-1:0][7:0] rdata
);

  logic [N-1:0][7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

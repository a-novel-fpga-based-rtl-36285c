`timescale 1ps / 1fs
// weight_memory: int8 weights and biases of the network, N per row.
//
// A weight tile is N consecutive rows: row r holds the weights from input r
// of the tile to the N outputs of the tile. A bias row holds the N int8
// biases of one output tile. The memory is written from outside (host port)
// to deploy or replace a model without changing the hardware, and read by
// the control unit, registered (data the cycle after raddr with re).
// The depth (8192 rows, room for the 60,289 parameters of the single-hidden-
// layer network once padded to tiles) is this design's choice.
module weight_memory #(
  parameter int N     = 14,
  parameter int DEPTH = 8192,
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

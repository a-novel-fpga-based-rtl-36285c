`timescale 1ps / 1fs
// vector_register_file: accumulator rows between the systolic array and the
// activation unit.
//
// Each row holds N signed ACC_W-bit sums, one per output of the current
// output tile, for one vector. A layer's input is split into many tiles; the
// first tile's results overwrite a row (acc = 0) and every further tile's
// results are added to it (acc = 1), so after the last tile the row holds
// the full dot products. The write (or read-add-write) takes one cycle; the
// read port is registered (data the cycle after raddr with re).
// The depth (32 rows) and width (32 bits) are this design's choices.
module vector_register_file #(
  parameter int N     = 14,
  parameter int ACC_W = 32,
  parameter int DEPTH = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic                    acc,
  input  logic [AW-1:0]           waddr,
  input  logic [N-1:0][ACC_W-1:0] wdata,
  input  logic                    re,
  input  logic [AW-1:0]           raddr,
  output logic [N-1:0][ACC_W-1:0] rdata
);

  logic [N-1:0][ACC_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int l = 0; l < N; l++)
        mem[waddr][l] <= acc ? mem[waddr][l] + wdata[l] : wdata[l];
    end
    if (re) rdata <= mem[raddr];
  end

endmodule

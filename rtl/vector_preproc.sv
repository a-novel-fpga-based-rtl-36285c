`timescale 1ps / 1fs
// vector_preproc: vector pre-processing between the CDC FIFO and the
// accelerator's I/O memory.
//
// Every bit of the raw measurement word is one network input, worth int8 1
// or 0. The word is cut into N_TILES tiles of N inputs each (940 bits -> 68
// tiles of 14, the last one padded with zeros) so that it matches the N x N
// systolic array. Tile t of vector slot n goes to I/O memory row
//   IN_BASE + t*N + n,
// so that the N vectors of one tile sit in N consecutive rows and one
// matrix-multiply instruction can stream them all through the array against
// the same weight tile. One tile is written per clock.
//
// A counter tracks the vectors stored. After N vectors, start_exec rises
// and stays high (the control unit then runs the network on the batch) until
// the control unit pulses `clear`. While a vector is being written, or the
// batch is full, `ready` is low.
//
// Cutting the vector into array-sized tiles, counting to N vectors and
// raising start_exec follow the document; the row layout and the 0/1 int8
// encoding are this design's choices.
//
// Timing: a vector accepted on in_valid is written over the next N_TILES
// cycles; start_exec rises the cycle after the last tile of the Nth vector.
// Each lane carries 0 or 1, so bits 7:1 of every io_wdata lane are constant
// zero; the lanes stay int8 because the same memory rows also hold int8
// hidden activations. Bits of in_vec above VEC_BITS (FIFO padding) are unused.
module vector_preproc #(
  parameter int N        = 14,
  parameter int VEC_BITS = 940,
  parameter int IN_W     = 1024,
  parameter int IO_AW    = 11,
  parameter int IN_BASE  = 0,
  parameter int N_TILES  = (VEC_BITS + N - 1) / N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      in_vec,
  output logic                 ready,
  input  logic                 clear,
  output logic                 start_exec,
  output logic                 io_we,
  output logic [IO_AW-1:0]     io_waddr,
  output logic [N-1:0][7:0]    io_wdata
);

  localparam int TW = $clog2(N_TILES + 1);
  localparam int NW = $clog2(N + 1);

  logic [N_TILES*N-1:0] word;    // the vector being split, zero-padded
  logic                 busy;
  logic [TW-1:0]        tile;
  logic [NW-1:0]        n_stored;

  assign ready      = !busy && (n_stored < NW'(N));
  assign start_exec = !busy && (n_stored == NW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      tile     <= '0;
      n_stored <= '0;
    end else if (clear) begin
      busy     <= 1'b0;
      tile     <= '0;
      n_stored <= '0;
    end else if (!busy) begin
      if (in_valid && ready) begin
        busy <= 1'b1;
        tile <= '0;
      end
    end else if (tile == TW'(N_TILES - 1)) begin
      busy     <= 1'b0;
      n_stored <= n_stored + 1'b1;
    end else begin
      tile <= tile + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!busy && in_valid && ready)
      word <= (N_TILES*N)'(in_vec[VEC_BITS-1:0]);
  end

  always_comb begin
    io_we    = busy;
    io_waddr = IO_AW'(IN_BASE) + IO_AW'(tile) * IO_AW'(N) + IO_AW'(n_stored);
    for (int l = 0; l < N; l++)
      io_wdata[l] = {7'd0, word[int'(tile) * N + l]};
  end

endmodule

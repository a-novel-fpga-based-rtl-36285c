`timescale 1ps / 1fs
// cdc_fifo: asynchronous FIFO, the only crossing between the 400 MHz TDC
// clock domain (write side) and the 200 MHz accelerator domain (read side).
//
// The FIFO absorbs bursts of measurements (particle spills) while the
// accelerator works through earlier ones. It is WIDTH bits wide (1024, room
// for the 940-bit raw vector) and DEPTH entries deep (2048, about 2 ms of
// measurements at one per microsecond), as published. The published design
// generates this block with a vendor tool; this is a plain implementation of
// the same function: a dual-clock memory with binary/Gray read and write
// pointers, each passed to the other side through a two-flop synchronizer.
//
// Flags, as the vendor FIFO names them:
//   wr_ack    write side, one cycle after a write that was accepted
//   overflow  write side, one cycle after a write refused because full
//   full      write side
//   empty     read side
//   rd_valid  read side, one cycle after an accepted rd_en, with rd_data
// A write while full and a read while empty are ignored. The flags are
// pessimistic across the crossing: full and empty may stay set a few cycles
// after the other side has moved, never the reverse.
// The document's FIFO is a vendor IP core with a 1024-bit port, 2048 entries,
// wr_ack and overflow flags; this is a plain Gray-pointer FIFO of the same
// size and flags, and its registered read is this design's choice.
module cdc_fifo #(
  parameter int WIDTH = 1024,
  parameter int DEPTH = 2048
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             wr_ack,
  output logic             overflow,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] wbin_next, rbin_next;
  logic        wr_do, rd_do;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign full      = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr_do     = wr_en && !full;
  assign wbin_next = wbin + (AW+1)'(wr_do);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      wr_ack   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      wr_ack   <= wr_do;
      overflow <= wr_en && full;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_do) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  assign empty     = (rgray == wgray_r2);
  assign rd_do     = rd_en && !empty;
  assign rbin_next = rbin + (AW+1)'(rd_do);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_valid <= 1'b0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rd_valid <= rd_do;
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_do) rd_data <= mem[rbin[AW-1:0]];
  end

endmodule

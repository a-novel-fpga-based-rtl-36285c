`timescale 1ps / 1fs
// instr_memory: persistent program store of the accelerator.
//
// Instead of a FIFO whose instructions are consumed as they execute, the
// program is kept in a memory and re-run from address 0 for every batch of
// measurements, so it is loaded once (host write port) and never again.
// Read is registered: the instruction appears the cycle after raddr with re.
// The depth (1024 instructions) is this design's choice.
module instr_memory
  import tdc_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

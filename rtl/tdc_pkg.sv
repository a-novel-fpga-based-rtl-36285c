`timescale 1ps / 1fs
// tdc_pkg: sizes, types and the instruction format shared by the TDC front
// end and the systolic-array accelerator.
//
// The sizes follow the published design: two 464-tap delay lines, a 12-bit
// coarse counter (940 raw bits per measurement), a 1024-bit x 2048-entry
// clock-domain-crossing FIFO and a 14 x 14 int8 systolic array. The
// instruction set, the memory depths and the accumulator width are this
// design's own choices; the published design reuses an existing tensor
// processor whose instruction encoding it does not give.
package tdc_pkg;

  // ---------------- measurement side ----------------
  localparam int N_TAPS     = 464;                  // taps per delay line
  localparam int CNT_W      = 12;                   // coarse counter width
  localparam int VEC_BITS   = 2 * N_TAPS + CNT_W;   // 940 raw bits
  localparam int FIFO_W     = 1024;                 // FIFO port width
  localparam int FIFO_DEPTH = 2048;                 // FIFO entries

  // ---------------- accelerator side ----------------
  localparam int SA_N   = 14;   // systolic array is SA_N x SA_N
  localparam int ACC_W  = 32;   // accumulator / partial-sum width
  localparam int IO_AW  = 11;   // I/O memory: 2048 rows of SA_N int8
  localparam int WM_AW  = 13;   // weight memory: 8192 rows of SA_N int8
  localparam int IM_AW  = 10;   // instruction memory: 1024 instructions
  localparam int VRF_AW = 5;    // vector register file: 32 accumulator rows

  // Number of SA_N-element input tiles per raw vector (940 -> 68 tiles).
  localparam int N_IN_TILES = (VEC_BITS + SA_N - 1) / SA_N;

  typedef enum logic [2:0] {
    OP_NOP    = 3'd0,
    OP_LOADW  = 3'd1,   // load SA_N weight rows from weight memory into the PEs
    OP_MATMUL = 3'd2,   // stream SA_N I/O rows through the array into the VRF
    OP_ACT    = 3'd3,   // bias + requantise (+ReLU) SA_N VRF rows into I/O memory
    OP_HALT   = 3'd4    // end of program: release the batch, wait for the next
  } opcode_e;

  typedef struct packed {
    opcode_e             op;
    logic                acc;      // MATMUL: add to VRF rows instead of overwrite
    logic                relu;     // ACT: apply ReLU
    logic                out;      // ACT: also emit lane 0 as a timestamp
    logic [4:0]          shift;    // ACT: arithmetic right shift for requantising
    logic [4:0]          bshift;   // ACT: left shift applied to the int8 bias
    logic [VRF_AW-1:0]   vrf_addr; // MATMUL/ACT: first VRF row
    logic [IO_AW-1:0]    io_addr;  // MATMUL: first input row / ACT: first output row
    logic [WM_AW-1:0]    w_addr;   // LOADW: first weight row / ACT: bias row
  } instr_t;

  localparam int INSTR_W = $bits(instr_t);

endpackage

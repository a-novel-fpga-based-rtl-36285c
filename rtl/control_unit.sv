`timescale 1ps / 1fs
// control_unit: sequencer of the accelerator clock domain.
//
// Idle: while the vector pre-processing can take a vector and the CDC FIFO is
// not empty, it pulls one word (rd_en, one read in flight at a time). When
// the pre-processing reports a full batch (start_exec), it runs the program
// in the instruction memory from address 0:
//
//   LOADW  w_addr              N cycles: weight rows w_addr.. into PE rows 0..N-1
//   MATMUL io_addr vrf_addr acc N cycles issuing I/O rows io_addr.. to the array,
//                              then waits for the N result rows, written (acc=0)
//                              or added (acc=1) to VRF rows vrf_addr..
//   ACT    vrf_addr io_addr w_addr shift bshift relu out
//                              reads bias row w_addr, then N VRF rows through the
//                              activation unit into I/O rows io_addr..; with
//                              out=1 each row's lane 0 is also a timestamp
//   HALT                       releases the batch (clear) and returns to idle
//   NOP                        nothing
//
// Each instruction is fetched from the registered instruction memory (one
// cycle), decoded the next, and executed to completion before the next fetch.
// The program is persistent: it runs again, unchanged, for every batch.
// Starting on a batch of N vectors, pulling from the FIFO and stepping through
// a stored program follow the document. The document wakes the control unit
// with the FIFO's write acknowledge; here it watches the FIFO's read-side
// empty flag, which carries the same news already in its own clock domain.
// The instruction set is this design's own.
// vrf_we and act_io_we are sa_y_valid and act_out_valid passed straight
// through: a result row is written in the cycle it arrives. The assertions
// are disabled during reset with rst_n, which lint reports as a reset used
// both synchronously and asynchronously; only the assertions use it so.
// The opcode bits of the held instruction are unused: the opcode is acted on
// at decode, straight from the memory output.
module control_unit
  import tdc_pkg::*;
#(
  parameter int N = SA_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CDC FIFO, read side
  input  logic                 fifo_empty,
  input  logic                 fifo_rd_valid,
  output logic                 fifo_rd_en,
  // vector pre-processing
  input  logic                 pp_ready,
  input  logic                 pp_start_exec,
  output logic                 pp_clear,
  // instruction memory
  output logic                 im_re,
  output logic [IM_AW-1:0]     im_raddr,
  input  instr_t               im_rdata,
  // weight memory read port
  output logic                 wm_re,
  output logic [WM_AW-1:0]     wm_raddr,
  // systolic array weight load
  output logic                 sa_w_we,
  output logic [$clog2(N)-1:0] sa_w_row,
  // I/O memory read port and data preparation
  output logic                 io_re,
  output logic [IO_AW-1:0]     io_raddr,
  output logic                 dp_valid,
  // array results into the vector register file
  input  logic                 sa_y_valid,
  output logic                 vrf_we,
  output logic                 vrf_acc,
  output logic [VRF_AW-1:0]    vrf_waddr,
  output logic                 vrf_re,
  output logic [VRF_AW-1:0]    vrf_raddr,
  // activation unit
  output logic                 act_in_valid,
  output logic [4:0]           act_shift,
  output logic [4:0]           act_bshift,
  output logic                 act_relu,
  input  logic                 act_out_valid,
  output logic                 act_io_we,
  output logic [IO_AW-1:0]     act_io_waddr,
  output logic                 ts_valid,
  output logic [$clog2(N)-1:0] ts_index,
  // status
  output logic                 busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_DECODE, S_LOADW, S_MM_ISSUE, S_MM_WAIT,
    S_ACT_BIAS, S_ACT_ISSUE, S_ACT_WAIT
  } state_e;

  localparam int CW = $clog2(N + 1);

  state_e                 state;
  instr_t                 ir;
  logic [IM_AW-1:0]       pc;
  logic [CW-1:0]          k;        // issue counter
  logic [CW-1:0]          res_cnt;  // results returned
  logic                   rd_wait;
  logic                   ld_v;
  logic [$clog2(N)-1:0]   ld_row;
  logic                   mm_v, av;

  // ---------------- combinational outputs ----------------
  always_comb begin
    fifo_rd_en = (state == S_IDLE) && !fifo_empty && pp_ready && !rd_wait;
    im_re      = (state == S_FETCH);
    im_raddr   = pc;
    wm_re      = (state == S_LOADW) || (state == S_ACT_BIAS);
    wm_raddr   = (state == S_LOADW) ? ir.w_addr + WM_AW'(k) : ir.w_addr;
    sa_w_we    = ld_v;
    sa_w_row   = ld_row;
    io_re      = (state == S_MM_ISSUE);
    io_raddr   = ir.io_addr + IO_AW'(k);
    dp_valid   = mm_v;
    vrf_we     = sa_y_valid;
    vrf_acc    = ir.acc;
    vrf_waddr  = ir.vrf_addr + VRF_AW'(res_cnt);
    vrf_re     = (state == S_ACT_ISSUE);
    vrf_raddr  = ir.vrf_addr + VRF_AW'(k);
    act_in_valid = av;
    act_shift  = ir.shift;
    act_bshift = ir.bshift;
    act_relu   = ir.relu;
    act_io_we  = act_out_valid;
    act_io_waddr = ir.io_addr + IO_AW'(res_cnt);
    ts_valid   = act_out_valid && ir.out;
    ts_index   = $clog2(N)'(res_cnt);
    busy       = (state != S_IDLE);
    // the batch is released on the same edge that returns the sequencer to idle
    pp_clear   = (state == S_DECODE) && (im_rdata.op == OP_HALT);
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ir       <= '0;
      pc       <= '0;
      k        <= '0;
      res_cnt  <= '0;
      rd_wait  <= 1'b0;
      ld_v     <= 1'b0;
      ld_row   <= '0;
      mm_v     <= 1'b0;
      av       <= 1'b0;
    end else begin
      ld_v     <= (state == S_LOADW);
      ld_row   <= $clog2(N)'(k);
      mm_v     <= (state == S_MM_ISSUE);
      av       <= (state == S_ACT_ISSUE);

      if (fifo_rd_en)         rd_wait <= 1'b1;
      else if (fifo_rd_valid) rd_wait <= 1'b0;

      if (sa_y_valid || act_out_valid) res_cnt <= res_cnt + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (pp_start_exec && !rd_wait) begin
            pc    <= '0;
            state <= S_FETCH;
          end
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ir      <= im_rdata;
          pc      <= pc + 1'b1;
          k       <= '0;
          res_cnt <= '0;
          unique case (im_rdata.op)
            OP_LOADW:  state <= S_LOADW;
            OP_MATMUL: state <= S_MM_ISSUE;
            OP_ACT:    state <= S_ACT_BIAS;
            OP_HALT:   state <= S_IDLE;
            default:   state <= S_FETCH;
          endcase
        end
        S_LOADW: begin
          k <= k + 1'b1;
          if (k == CW'(N - 1)) state <= S_FETCH;
        end
        S_MM_ISSUE: begin
          k <= k + 1'b1;
          if (k == CW'(N - 1)) state <= S_MM_WAIT;
        end
        S_MM_WAIT: begin
          if (res_cnt == CW'(N)) state <= S_FETCH;
        end
        S_ACT_BIAS: state <= S_ACT_ISSUE;
        S_ACT_ISSUE: begin
          k <= k + 1'b1;
          if (k == CW'(N - 1)) state <= S_ACT_WAIT;
        end
        S_ACT_WAIT: begin
          if (res_cnt == CW'(N)) state <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- protocol rules ----------------
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_rd_en |-> !fifo_empty);
  a_one_read_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_rd_en |-> !rd_wait);
  a_results_only_when_running: assert property (@(posedge clk) disable iff (!rst_n)
    (sa_y_valid || act_out_valid) |-> busy);

endmodule

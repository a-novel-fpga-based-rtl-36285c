`timescale 1ps / 1fs
// tpu_accelerator: the neural-network engine of the 200 MHz clock domain.
//
// Data path, in the order data flows:
//   CDC FIFO word -> vector_preproc -> io_memory -> systolic_data_prep ->
//   systolic_array (N x N int8 PEs, weights from weight_memory) ->
//   vector_register_file -> activation_unit -> back to io_memory,
// with the last layer's linear output leaving on ts_valid / ts_value.
// control_unit sequences it from the program in instr_memory.
//
// One batch is N raw vectors. For a fully connected layer with I inputs and O
// outputs the program holds, for every output tile, one LOADW + MATMUL pair
// per input tile (the first MATMUL overwriting the VRF rows, the rest adding),
// then one ACT that writes the N activated rows back into the I/O memory.
// Every weight tile thus serves all N vectors of the batch before the next is
// loaded. A network of another size or depth is only another program and
// another weight image; the hardware is the same.
//
// Host ports load the weight memory (wm_*) and the instruction memory (im_*);
// they may be written while the engine is idle. ts_index gives the slot of
// the vector within its batch (the order in which it left the FIFO).
// Only lane 0 of the activation unit's full-width output is used (the single
// output neuron). rst_n also disables the assertions, which lint reports as a
// reset used both synchronously and asynchronously.
// The set of blocks and the order of the data path follow the document's
// block diagram; how each block works inside is this design's own.
module tpu_accelerator
  import tdc_pkg::*;
#(
  parameter int N        = SA_N,
  parameter int VB       = tdc_pkg::VEC_BITS,
  parameter int IN_W     = FIFO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CDC FIFO read side
  input  logic                 fifo_empty,
  input  logic                 fifo_rd_valid,
  input  logic [IN_W-1:0]      fifo_rd_data,
  output logic                 fifo_rd_en,
  // host: weight and program loading
  input  logic                 wm_we,
  input  logic [WM_AW-1:0]     wm_waddr,
  input  logic [N-1:0][7:0]    wm_wdata,
  input  logic                 im_we,
  input  logic [IM_AW-1:0]     im_waddr,
  input  instr_t               im_wdata,
  // results
  output logic                 ts_valid,
  output logic [ACC_W-1:0]     ts_value,
  output logic [$clog2(N)-1:0] ts_index,
  output logic                 busy
);

  // pre-processing
  logic                 pp_ready, pp_start, pp_clear, pp_we;
  logic [IO_AW-1:0]     pp_waddr;
  logic [N-1:0][7:0]    pp_wdata;
  // memories
  logic                 im_re;
  logic [IM_AW-1:0]     im_raddr;
  instr_t               im_rdata;
  logic                 wm_re;
  logic [WM_AW-1:0]     wm_raddr;
  logic [N-1:0][7:0]    wm_rdata;
  logic                 io_re, io_we;
  logic [IO_AW-1:0]     io_raddr, io_waddr;
  logic [N-1:0][7:0]    io_rdata, io_wdata;
  // array
  logic                 sa_w_we;
  logic [$clog2(N)-1:0] sa_w_row;
  logic                 dp_valid, dp_out_valid, sa_y_valid;
  logic [N-1:0][7:0]    dp_lane;
  logic [N-1:0][ACC_W-1:0] sa_y_row;
  // accumulators and activation
  logic                 vrf_we, vrf_acc, vrf_re;
  logic [VRF_AW-1:0]    vrf_waddr, vrf_raddr;
  logic [N-1:0][ACC_W-1:0] vrf_rdata;
  logic                 act_in_valid, act_out_valid, act_relu, act_io_we;
  logic [4:0]           act_shift, act_bshift;
  logic [IO_AW-1:0]     act_io_waddr;
  logic [N-1:0][7:0]    act_q;
  logic [N-1:0][ACC_W-1:0] act_full;

  vector_preproc #(.N(N), .VEC_BITS(VB), .IN_W(IN_W), .IO_AW(IO_AW)) u_pp (
    .clk, .rst_n,
    .in_valid  (fifo_rd_valid),
    .in_vec    (fifo_rd_data),
    .ready     (pp_ready),
    .clear     (pp_clear),
    .start_exec(pp_start),
    .io_we     (pp_we),
    .io_waddr  (pp_waddr),
    .io_wdata  (pp_wdata)
  );

  control_unit #(.N(N)) u_cu (
    .clk, .rst_n,
    .fifo_empty, .fifo_rd_valid, .fifo_rd_en,
    .pp_ready, .pp_start_exec(pp_start), .pp_clear,
    .im_re, .im_raddr, .im_rdata,
    .wm_re, .wm_raddr,
    .sa_w_we, .sa_w_row,
    .io_re, .io_raddr, .dp_valid,
    .sa_y_valid,
    .vrf_we, .vrf_acc, .vrf_waddr, .vrf_re, .vrf_raddr,
    .act_in_valid, .act_shift, .act_bshift, .act_relu,
    .act_out_valid, .act_io_we, .act_io_waddr,
    .ts_valid, .ts_index,
    .busy
  );

  instr_memory u_im (
    .clk, .we(im_we), .waddr(im_waddr), .wdata(im_wdata),
    .re(im_re), .raddr(im_raddr), .rdata(im_rdata)
  );

  weight_memory #(.N(N), .DEPTH(2**WM_AW)) u_wm (
    .clk, .we(wm_we), .waddr(wm_waddr), .wdata(wm_wdata),
    .re(wm_re), .raddr(wm_raddr), .rdata(wm_rdata)
  );

  // The pre-processing writes only while the engine is idle, the activation
  // unit only while it runs.
  assign io_we    = act_io_we || pp_we;
  assign io_waddr = act_io_we ? act_io_waddr : pp_waddr;
  assign io_wdata = act_io_we ? act_q : pp_wdata;

  io_memory #(.N(N), .DEPTH(2**IO_AW)) u_io (
    .clk, .we(io_we), .waddr(io_waddr), .wdata(io_wdata),
    .re(io_re), .raddr(io_raddr), .rdata(io_rdata)
  );

  systolic_data_prep #(.N(N)) u_dp (
    .clk, .rst_n,
    .in_valid (dp_valid),
    .in_row   (io_rdata),
    .out_valid(dp_out_valid),
    .out_lane (dp_lane)
  );

  systolic_array #(.N(N), .ACC_W(ACC_W)) u_sa (
    .clk, .rst_n,
    .w_we    (sa_w_we),
    .w_row   (sa_w_row),
    .w_data  (wm_rdata),
    .in_valid(dp_out_valid),
    .x_lane  (dp_lane),
    .y_valid (sa_y_valid),
    .y_row   (sa_y_row)
  );

  vector_register_file #(.N(N), .ACC_W(ACC_W), .DEPTH(2**VRF_AW)) u_vrf (
    .clk, .we(vrf_we), .acc(vrf_acc), .waddr(vrf_waddr), .wdata(sa_y_row),
    .re(vrf_re), .raddr(vrf_raddr), .rdata(vrf_rdata)
  );

  activation_unit #(.N(N), .ACC_W(ACC_W)) u_act (
    .clk, .rst_n,
    .in_valid (act_in_valid),
    .acc      (vrf_rdata),
    .bias     (wm_rdata),
    .shift    (act_shift),
    .bshift   (act_bshift),
    .relu     (act_relu),
    .out_valid(act_out_valid),
    .q        (act_q),
    .full     (act_full)
  );

  assign ts_value = act_full[0];

  a_io_port_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(act_io_we && pp_we));

endmodule

`timescale 1ps / 1fs
// sa_pe: one processing element of the weight-stationary systolic array.
//
// The PE keeps one int8 weight in a register (loaded with w_load) for as
// long as a weight tile is in use. Each cycle it multiplies the int8 input
// arriving from the left by that weight, adds the partial sum arriving from
// above, and registers both the input (passed to the right) and the new
// partial sum (passed down the column). All arithmetic is signed.
// Timing: x_out and psum_out follow x_in and psum_in by one cycle.
// Weight-stationary int8 PEs with partial sums flowing down the columns follow
// the document; the 32-bit partial-sum width is this design's choice.
module sa_pe #(
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_load,
  input  logic signed [7:0]       w_in,
  input  logic signed [7:0]       x_in,
  input  logic signed [ACC_W-1:0] psum_in,
  output logic signed [7:0]       x_out,
  output logic signed [ACC_W-1:0] psum_out
);

  logic signed [7:0]  w;
  logic signed [15:0] prod;

  assign prod = x_in * w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w        <= '0;
      x_out    <= '0;
      psum_out <= '0;
    end else begin
      if (w_load) w <= w_in;
      x_out    <= x_in;
      psum_out <= psum_in + ACC_W'(prod);
    end
  end

endmodule

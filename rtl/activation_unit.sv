`timescale 1ps / 1fs
// activation_unit: bias, requantisation and ReLU for one accumulator row.
//
// For each of the N lanes:
//   full = acc + (sign-extended int8 bias <<< bshift)
//   q    = full >>> shift, ReLU'd if relu is set, saturated to int8
// `q` goes back to the I/O memory as the input of the next layer; `full` is
// the un-quantised value, used for the single linear output neuron whose
// value is the timestamp. Hidden layers use ReLU and the output neuron is
// linear, as published; weights, biases and activations are int8. The bias
// and requantisation shifts stand in for the quantisation scales of the
// trained network and are this design's choice.
// Timing: one register stage; out_valid follows in_valid by one cycle.
module activation_unit #(
  parameter int N     = 14,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0][ACC_W-1:0] acc,
  input  logic [N-1:0][7:0]       bias,
  input  logic [4:0]              shift,
  input  logic [4:0]              bshift,
  input  logic                    relu,
  output logic                    out_valid,
  output logic [N-1:0][7:0]       q,
  output logic [N-1:0][ACC_W-1:0] full
);

  logic [N-1:0][7:0]       q_c;
  logic [N-1:0][ACC_W-1:0] full_c;

  always_comb begin
    for (int l = 0; l < N; l++) begin
      logic signed [ACC_W-1:0] b, f, s;
      b = ACC_W'($signed(bias[l])) <<< bshift;
      f = $signed(acc[l]) + b;
      s = f >>> shift;
      if (relu && s < 0) s = '0;
      if (s > 127)       q_c[l] = 8'sd127;
      else if (s < -128) q_c[l] = -8'sd128;
      else               q_c[l] = s[7:0];
      full_c[l] = f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    q    <= q_c;
    full <= full_c;
  end

endmodule

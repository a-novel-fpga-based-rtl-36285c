`timescale 1ps / 1fs
// tdl_sampler: the register bank under a delay line, plus event detection.
//
// Every tap of the line is captured on the rising clock edge, which is the
// STOP of the line: the captured word is the thermometer code (ones for the
// taps the edge has passed, zeros beyond, bubbles where arrivals are out of
// order). A second register stage follows, as the layout places a first and
// a second sampling stage; it gives the first stage a full cycle to settle
// from metastability. Sampling every tap on the clock follows the document;
// the two-stage arrangement is read from its layout figure.
//
// `hit` marks the cycle in which `code` holds the first sample taken after a
// rising edge on the line input: any of the first HIT_TAPS taps is set now
// and none of them was set in the sample before. Looking at a group of taps
// rather than tap 0 alone keeps a bubble at the entry from hiding the event
// (this design's choice).
//
// Timing: code and hit appear two cycles after the sampling edge.
module tdl_sampler #(
  parameter int N_TAPS   = 464,
  parameter int HIT_TAPS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] taps,   // asynchronous tap outputs of the line
  output logic [N_TAPS-1:0] code,   // sampled thermometer code
  output logic              hit     // code is the first sample after an edge
);

  logic [N_TAPS-1:0] stage1;
  logic              prev_any;
  logic              now_any;

  always_ff @(posedge clk) begin
    stage1 <= taps;
    code   <= stage1;
  end

  assign now_any = |code[HIT_TAPS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev_any <= 1'b1;   // an input already high at reset is no event
    else        prev_any <= now_any;
  end

  assign hit = now_any && !prev_any;

endmodule

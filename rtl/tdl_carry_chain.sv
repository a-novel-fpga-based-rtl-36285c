`timescale 1ps / 1fs
// tdl_carry_chain: BEHAVIOURAL MODEL (not synthesizable) of one tapped delay
// line built from FPGA carry logic.
//
// On the FPGA the line is a chain of CARRY8 primitives whose carry outputs
// are the taps; its delays are a physical property of the device and cannot
// be written as logic. This model reproduces the behaviour that matters to
// the rest of the design: an edge on `start` reaches tap i after the sum of
// the element delays up to i, with
//   * a nominal element delay BASE_PS,
//   * an extra TILE_PS on every eighth element, where the signal leaves one
//     carry block for the next (the wide bins the layout cannot remove),
//   * a fixed per-tap skew of up to +/-SKEW_PS between tap and sampling
//     flip-flop, which makes arrivals out of order and so produces bubbles
//     in the sampled thermometer code.
// The defaults average 6.03 ps per tap (the published resolution), so 464
// taps span about 2.8 ns, more than one 2.5 ns period of the 400 MHz clock as
// the architecture requires. The split of that average into BASE_PS, TILE_PS
// and SKEW_PS is this model's own choice.
//
// Interface: start (the S1 or S2 input), taps[N_TAPS-1:0] (tap 0 nearest the
// entry). Timing: each tap follows `start` after its own delay; `start` must
// stay at a level for longer than the whole line (about 3 ns) for every tap
// to follow it.
module tdl_carry_chain #(
  parameter int  N_TAPS  = 464,
  parameter real BASE_PS = 5.5,
  parameter real TILE_PS = 4.24,
  parameter real SKEW_PS = 6.0,
  parameter int  SEED    = 1
) (
  input  logic              start,
  output logic [N_TAPS-1:0] taps
);

  // Fixed pseudo-random skew in [-SKEW_PS, +SKEW_PS] for tap i.
  function automatic real tap_skew(input int i);
    logic [31:0] h;
    h = 32'(i) * 32'h9E3779B1 + 32'(SEED) * 32'h85EBCA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return SKEW_PS * (real'(int'(h % 32'd201)) - 100.0) / 100.0;
  endfunction

  // Arrival time of an edge at tap i, counted from the edge on `start`.
  function automatic real tap_arrival(input int i);
    real t;
    t = 0.0;
    for (int k = 0; k <= i; k++) t += BASE_PS + (((k % 8) == 7) ? TILE_PS : 0.0);
    t += tap_skew(i);
    return (t < 0.5) ? 0.5 : t;
  endfunction

  initial taps = '0;

  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    localparam realtime ARRIVAL = tap_arrival(i);
    always @(start) taps[i] <= #(ARRIVAL) start;
  end

endmodule

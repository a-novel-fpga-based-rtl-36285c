`timescale 1ps / 1fs
// tb_tdl_carry_chain: checks the delay-line model at full length (464 taps).
// An edge on `start` must reach about t/6.03 ps taps after t, cover the whole
// line in under 3 ns (more than one 2.5 ns clock period), produce at least
// one bubble (a 0 below the highest 1) somewhere along the way, and clear
// again after a falling edge.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_tdl_carry_chain;
  localparam int N = 464;
  logic start;
  logic [N-1:0] taps;
  int checks = 0, failures = 0, bubbles = 0;

  tdl_carry_chain #(.N_TAPS(N)) dut (.start(start), .taps(taps));

  function automatic int ones(input logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction
  function automatic bit has_bubble(input logic [N-1:0] v);
    int top = -1;
    for (int i = 0; i < N; i++) if (v[i]) top = i;
    for (int i = 0; i < top; i++) if (!v[i]) return 1;
    return 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    #1000;
    check(taps == '0, "line idle before the edge");
    start = 1;
    for (int t = 1; t <= 2700; t++) begin
      int exp_ones, got;
      #1;
      if (has_bubble(taps)) bubbles++;
      if (t % 100 != 0) continue;
      got = ones(taps);
      exp_ones = int'(real'(t) / 6.03);
      check(got >= exp_ones - 8 && got <= exp_ones + 8,
            $sformatf("at %0d ps: %0d taps set, expected about %0d", t, got, exp_ones));
    end
    #400;
    check(taps == '1, "whole line set within 3.1 ns");
    check(bubbles > 0, "bubbles appear in the code");
    start = 0;
    #3200;
    check(taps == '0, "line clears after the falling edge");
    $display("bubbled samples: %0d", bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

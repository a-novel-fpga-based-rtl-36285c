`timescale 1ps / 1fs
// tb_activation_unit: random accumulators, biases and shifts, with and
// without ReLU. The expected value is computed here with 64-bit integers:
// full = acc + bias*2^bshift; q = clamp(floor(full / 2^shift)), clamped to
// [0,127] with ReLU and to [-128,127] without. Counts how often ReLU and
// saturation acted.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_activation_unit;
  localparam int N = 14;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, in_valid = 0, relu = 0, out_valid;
  logic [N-1:0][31:0] acc, full;
  logic [N-1:0][7:0] bias, q;
  logic [4:0] shift, bshift;
  int checks = 0, failures = 0, n_relu = 0, n_sat = 0;

  activation_unit #(.N(N), .ACC_W(32)) dut (.clk, .rst_n, .in_valid, .acc, .bias, .shift, .bshift,
    .relu, .out_valid, .q, .full);

  always #2500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      in_valid = 1;
      relu = i[0];
      shift = 5'($urandom_range(0, 8));
      bshift = 5'($urandom_range(0, 6));
      for (int l = 0; l < N; l++) begin
        acc[l] = $urandom_range(0, 8000) - 4000;
        bias[l] = 8'($urandom);
      end
      @(negedge clk);
      check(out_valid, "out_valid one cycle after in_valid");
      for (int l = 0; l < N; l++) begin
        longint f, s, e;
        f = longint'($signed(acc[l])) + longint'($signed(bias[l])) * (64'sd1 <<< bshift);
        s = (f >= 0) ? f / (64'sd1 <<< shift) : -((-f + (64'sd1 <<< shift) - 1) / (64'sd1 <<< shift));
        e = s;
        if (relu && e < 0) begin e = 0; n_relu++; end
        if (e > 127) begin e = 127; n_sat++; end
        if (e < -128) begin e = -128; n_sat++; end
        check($signed(full[l]) == f, $sformatf("full %0d expected %0d", $signed(full[l]), f));
        check($signed(q[l]) == e, $sformatf("q %0d expected %0d (full %0d, shift %0d, relu %0b)",
              $signed(q[l]), e, f, shift, relu));
      end
    end
    in_valid = 0;
    @(negedge clk);
    check(!out_valid, "out_valid drops");
    check(n_relu > 0 && n_sat > 0, "ReLU and saturation both exercised");
    $display("ReLU applied %0d times, saturated %0d times", n_relu, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

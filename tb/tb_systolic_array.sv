`timescale 1ps / 1fs
// tb_systolic_array: full 14 x 14 array fed through systolic_data_prep.
// Loads a random signed weight tile, streams 20 random rows back to back,
// then a second tile with a gap between rows, and checks every result row
// against sum_r x[r]*w[r][c] computed here, in order, and the latency of
// 2N-1 cycles from a row entering the array to its result.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_systolic_array;
  localparam int N = 14;
  logic rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end
  logic clk = 0, w_we = 0, in_valid = 0, dp_valid, y_valid;
  logic [$clog2(N)-1:0] w_row;
  logic [N-1:0][7:0] w_data, in_row, lanes;
  logic [N-1:0][31:0] y_row;
  int checks = 0, failures = 0, cyc = 0;
  int W [N][N];
  logic [N-1:0][7:0] xq[$];
  int tq[$];

  systolic_data_prep #(.N(N)) u_dp (.clk, .rst_n, .in_valid, .in_row, .out_valid(dp_valid), .out_lane(lanes));
  systolic_array #(.N(N), .ACC_W(32)) dut (.clk, .rst_n, .w_we, .w_row, .w_data,
    .in_valid(dp_valid), .x_lane(lanes), .y_valid, .y_row);

  always #2500 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (y_valid) begin
    logic [N-1:0][7:0] x;
    int t0;
    x = xq.pop_front();
    t0 = tq.pop_front();
    // a row set up before edge t0+1 enters the array after that edge and
    // its result is visible 2N-1 edges later
    check(cyc - (t0 + 1) == 2 * N - 1, $sformatf("latency %0d", cyc - (t0 + 1)));
    for (int c = 0; c < N; c++) begin
      int e;
      e = 0;
      for (int r = 0; r < N; r++) e += $signed(x[r]) * W[r][c];
      check($signed(y_row[c]) == e, $sformatf("column %0d: %0d expected %0d", c, $signed(y_row[c]), e));
    end
  end

  task automatic load_tile();
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      w_we = 1; w_row = $clog2(N)'(r);
      for (int c = 0; c < N; c++) begin
        W[r][c] = $signed(8'($urandom));
        w_data[c] = 8'(W[r][c]);
      end
    end
    @(negedge clk) w_we = 0;
  endtask

  task automatic stream(input int rows, input int gap);
    for (int i = 0; i < rows; i++) begin
      @(negedge clk);
      in_valid = 1;
      for (int l = 0; l < N; l++) in_row[l] = 8'($urandom);
      xq.push_back(in_row); tq.push_back(cyc);
      if (gap > 0) begin
        @(negedge clk) in_valid = 0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3 * N) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_tile();
    stream(20, 0);
    load_tile();
    stream(10, 2);
    check(xq.size() == 0, "every row produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

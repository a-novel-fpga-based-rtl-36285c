`timescale 1ps / 1fs
// tb_cdc_fifo: writes at 400 MHz and reads at 200 MHz through a small FIFO
// (16 bits x 8). Checks data order against a queue, wr_ack after each
// accepted write, full and overflow when writing 12 words into 8 places
// with the reader stopped, empty and rd_valid on the read side.
// The stimulus, the reference values and the checks are this testbench's own;
// sizes and timing it checks against come from the design it tests.
module tb_cdc_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst_n, rrst_n;
  initial begin wrst_n = 1; rrst_n = 1; #1 wrst_n = 0; rrst_n = 0; end
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic full, wr_ack, overflow, rd_valid, empty;
  int checks = 0, failures = 0, n_overflow = 0, n_ack = 0, n_full = 0;
  logic [W-1:0] q[$];

  cdc_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .full, .wr_ack, .overflow,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_valid, .empty);

  always #1250 wclk = ~wclk;
  always #2500 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wclk) begin
    if (wr_ack) n_ack++;
    if (overflow) n_overflow++;
    if (full) n_full++;
  end

  // reader: pops whenever allowed (controlled by `reading`) and checks order
  bit reading = 0;
  int n_read = 0;
  always @(posedge rclk) begin
    if (rd_valid) begin
      check(q.size() > 0 && rd_data == q[0], $sformatf("read %h expected %h", rd_data, q.size() ? q[0] : 0));
      if (q.size()) void'(q.pop_front());
      n_read++;
    end
  end
  always @(negedge rclk) rd_en <= reading && !empty;

  task automatic write_word(input logic [W-1:0] d);
    @(negedge wclk);
    wr_en = 1; wr_data = d;
    if (!full) q.push_back(d);
    @(negedge wclk);
    wr_en = 0;
  endtask

  initial begin
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (2) @(posedge rclk);
    check(empty && !full, "empty after reset");
    // fill beyond capacity with the reader stopped
    for (int i = 0; i < 12; i++) write_word(W'(16'hA000 + i));
    repeat (2) @(posedge wclk);
    check(full, "full after 8 words");
    check(n_ack == D, $sformatf("%0d wr_ack pulses, expected %0d", n_ack, D));
    check(n_overflow == 12 - D, $sformatf("%0d overflows, expected %0d", n_overflow, 12 - D));
    // drain
    reading = 1;
    repeat (40) @(posedge rclk);
    check(n_read == D, $sformatf("read %0d words", n_read));
    check(empty, "empty after draining");
    // stream with random gaps, reader running
    for (int i = 0; i < 50; i++) begin
      write_word(W'($urandom));
      repeat ($urandom_range(0, 3)) @(negedge wclk);
    end
    repeat (60) @(posedge rclk);
    check(q.size() == 0, "every written word was read");
    check(n_read == D + 50, $sformatf("read %0d words in total", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

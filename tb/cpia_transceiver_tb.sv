`timescale 1ps/1ps
// cpia_transceiver_tb: one transceiver with its wires looped back (a wire
// follows the driver and keeps its voltage when released) at 200 MHz. Its
// send chip strobes drive its receive strobes, so every word it sends must
// come back on rx_data. Checks every word, the S-clock word period, the
// two-clock delay from last chip to rx_valid, and that the wires are released
// between words.
module cpia_transceiver_tb;
  import cpia_pkg::*;

  localparam int N  = 16;
  localparam int S  = 16;
  localparam int NW = ($clog2(N) + 2) / 2;

  logic clk = 0, rst_n = 0;
  logic tx_enable = 1, tx_out_en = 1, tx_load = 0;
  logic [N-1:0] tx_data = '0;
  logic tx_ready, tx_chip_valid, tx_chip_first;
  logic rx_oe = 1;
  logic [N-1:0] rx_data;
  logic rx_valid;
  pam_line_t line_out [NW];
  mv_t line_mv [NW];
  int checks = 0, failures = 0;
  int cycle = 0;

  cpia_transceiver dut (
    .clk, .rst_n, .tx_enable, .tx_out_en, .tx_load, .tx_data, .tx_ready,
    .tx_chip_valid, .tx_chip_first,
    .rx_chip_valid(tx_chip_valid), .rx_chip_first(tx_chip_first),
    .rx_oe, .rx_data, .rx_valid, .line_out, .line_mv
  );

  for (genvar w = 0; w < NW; w++) begin : g_loop
    mv_t v = '0;
    always @(line_out[w]) if (line_out[w].drive) v = line_out[w].mv;
    assign line_mv[w] = v;
  end

  always #2500 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  logic [N-1:0] exp_q[$];
  int words_out = 0;
  int last_chip_cycle = 0;
  int released = 0;
  int chip_in_word = 0;

  // monitor just after the falling edge
  always @(negedge clk) begin
    #1;
    // a chip is on the wires during this clock
    if (tx_chip_valid) begin
      chip_in_word = tx_chip_first ? 1 : chip_in_word + 1;
      if (chip_in_word == S) last_chip_cycle = cycle;
    end
    if (rx_valid) begin
      check(exp_q.size() > 0, "word received with none sent");
      check(rx_data == exp_q.pop_front(), "word received intact");
      check(cycle - last_chip_cycle == 2, "rx_valid two clocks after last chip");
      words_out++;
    end
    if (rst_n && !tx_chip_valid) begin
      bit any;
      any = 0;
      for (int w = 0; w < NW; w++) any |= line_out[w].drive;
      if (!any) released++;
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      tx_data = N'($urandom);
      tx_load = 1;
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      exp_q.push_back(tx_data);
      @(negedge clk);
      tx_load = (i % 3 != 0);  // some words back to back, some with a gap
      if (!tx_load) repeat (3) @(negedge clk);
    end
    tx_load = 0;
    repeat (2 * S + 6) @(posedge clk);
    check(words_out == 12, "all twelve words came back");
    check(released > 0, "wires released between words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// cpia_top_tb: end-to-end test of the interconnect at its default size
// (16-bit buses, 16 chips, 3 wires, 5 pF load) and 200 MHz. The testbench
// plays both CPUs; each receiving side takes its chip strobes from the
// sending side. It sends random words from CPU 1 to CPU 2 and back, and
// checks every received word. It counts each mechanism and fails if one never
// happened: words in both directions, a change of direction, words sent back
// to back, a stalled sender (output enable low mid-word), a disabled bus
// (the all-zero word), a blanked receive bus, wires released between words,
// every wire at each level its bit pair can take, and every one of the twelve level changes on
// the wires. No wire may ever be driven from both ends.
module cpia_top_tb;
  import cpia_pkg::*;

  localparam int N  = N_DEF;
  localparam int S  = S_DEF;
  localparam int NW = ($clog2(N) + 2) / 2;

  logic clk = 0, rst_n = 0;
  logic cpu1_tx_enable = 1, cpu1_tx_out_en = 1, cpu1_tx_load = 0;
  logic [N-1:0] cpu1_tx_data = '0;
  logic cpu1_tx_ready, cpu1_tx_chip_valid, cpu1_tx_chip_first;
  logic cpu1_rx_oe = 1;
  logic [N-1:0] cpu1_rx_data;
  logic cpu1_rx_valid;
  logic cpu2_tx_enable = 1, cpu2_tx_out_en = 1, cpu2_tx_load = 0;
  logic [N-1:0] cpu2_tx_data = '0;
  logic cpu2_tx_ready, cpu2_tx_chip_valid, cpu2_tx_chip_first;
  logic cpu2_rx_oe = 1;
  logic [N-1:0] cpu2_rx_data;
  logic cpu2_rx_valid;
  mv_t wire_mv [NW];
  logic [NW-1:0] contention;

  cpia_top dut (
    .clk, .rst_n,
    .cpu1_tx_enable, .cpu1_tx_out_en, .cpu1_tx_load, .cpu1_tx_data, .cpu1_tx_ready,
    .cpu1_tx_chip_valid, .cpu1_tx_chip_first,
    .cpu1_rx_chip_valid(cpu2_tx_chip_valid), .cpu1_rx_chip_first(cpu2_tx_chip_first),
    .cpu1_rx_oe, .cpu1_rx_data, .cpu1_rx_valid,
    .cpu2_tx_enable, .cpu2_tx_out_en, .cpu2_tx_load, .cpu2_tx_data, .cpu2_tx_ready,
    .cpu2_tx_chip_valid, .cpu2_tx_chip_first,
    .cpu2_rx_chip_valid(cpu1_tx_chip_valid), .cpu2_rx_chip_first(cpu1_tx_chip_first),
    .cpu2_rx_oe, .cpu2_rx_data, .cpu2_rx_valid,
    .wire_mv, .contention
  );

  always #2500 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // expected words per direction; blank flag: receiver had rx_oe low
  logic [N-1:0] exp12[$], exp21[$];
  bit blank12[$], blank21[$];
  int n12 = 0, n21 = 0, n_dir_change = 0, n_b2b = 0, n_stall = 0;
  int n_disabled = 0, n_blanked = 0, n_released = 0, n_contention = 0;
  int lvl_seen [NW][4];
  int trans_seen [4][4];

  always @(negedge clk) begin
    #1;
    if (cpu2_rx_valid) begin
      logic [N-1:0] e;
      bit b;
      check(exp12.size() > 0, "CPU 2 received a word none sent");
      e = exp12.pop_front();
      b = blank12.pop_front();
      check(cpu2_rx_data == (b ? '0 : e), $sformatf("1->2 got %h want %h", cpu2_rx_data, e));
      n12++;
    end
    if (cpu1_rx_valid) begin
      logic [N-1:0] e;
      bit b;
      check(exp21.size() > 0, "CPU 1 received a word none sent");
      e = exp21.pop_front();
      b = blank21.pop_front();
      check(cpu1_rx_data == (b ? '0 : e), $sformatf("2->1 got %h want %h", cpu1_rx_data, e));
      n21++;
    end
    if (rst_n && !cpu1_tx_chip_valid && !cpu2_tx_chip_valid &&
        !dut.drive1[0].drive && !dut.drive2[0].drive)
      n_released++;
    if (|contention) n_contention++;
    if (cpu1_tx_chip_valid || cpu2_tx_chip_valid) begin
      // sample the settled wire levels of this chip (before the next edge)
      for (int w = 0; w < NW; w++) lvl_seen[w][mv_to_level(wire_mv[w])]++;
    end
  end

  // level changes on the wires, with their nominal levels
  for (genvar w = 0; w < NW; w++) begin : g_mon
    int last = 0;
    always @(wire_mv[w]) begin
      int now;
      now = mv_to_level(wire_mv[w]);
      if (now != last) trans_seen[last][now]++;
      last = now;
    end
  end

  // Send a run of words from one CPU; stall > 0 drops out_en for that many
  // clocks in the middle of the first word.
  task automatic send(bit from1, int count, bit enable, bit blank, int stall, bit all_ones = 0);
    for (int i = 0; i < count; i++) begin
      logic [N-1:0] w;
      w = all_ones ? '1 : N'($urandom);
      @(negedge clk);
      if (from1) begin
        cpu1_tx_data = w; cpu1_tx_load = 1; cpu1_tx_enable = enable; cpu2_rx_oe = !blank;
      end else begin
        cpu2_tx_data = w; cpu2_tx_load = 1; cpu2_tx_enable = enable; cpu1_rx_oe = !blank;
      end
      @(posedge clk);
      while (!(from1 ? cpu1_tx_ready : cpu2_tx_ready)) @(posedge clk);
      if (from1) begin exp12.push_back(enable ? w : '0); blank12.push_back(blank); end
      else       begin exp21.push_back(enable ? w : '0); blank21.push_back(blank); end
      if (i > 0) n_b2b++;
      if (!enable) n_disabled++;
      if (blank) n_blanked++;
      if (stall > 0 && i == 0) begin
        @(negedge clk);
        cpu1_tx_load = 0;
        cpu2_tx_load = 0;
        repeat (S / 2) @(negedge clk);
        cpu1_tx_out_en = 0;
        cpu2_tx_out_en = 0;
        repeat (stall) @(negedge clk);
        n_stall++;
        cpu1_tx_out_en = 1;
        cpu2_tx_out_en = 1;
      end
    end
    @(negedge clk);
    cpu1_tx_load = 0;
    cpu2_tx_load = 0;
    // let the run finish on the wires and at the receiver
    repeat (S + 6) @(negedge clk);
    cpu1_tx_enable = 1; cpu2_tx_enable = 1; cpu1_rx_oe = 1; cpu2_rx_oe = 1;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int missing;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(1, 8, 1, 0, 0);            // CPU 1 -> CPU 2, back to back
    send(0, 8, 1, 0, 0);            // change of direction
    n_dir_change++;
    send(1, 3, 1, 0, 5);            // stalled sender
    n_dir_change++;
    send(0, 3, 1, 0, 4);
    n_dir_change++;
    send(1, 1, 0, 0, 0);            // bus lines disabled
    send(0, 1, 1, 1, 0);            // receiver's bus blanked
    n_dir_change++;
    send(1, 1, 1, 0, 0, 1);         // all ones: chip sum +N
    n_dir_change++;
    for (int r = 0; r < 6; r++) begin
      send(r % 2 == 0, 4, 1, 0, 0);
      n_dir_change++;
    end
    check(exp12.size() == 0 && exp21.size() == 0, "every word arrived");
    check(n12 > 0, "words CPU 1 -> CPU 2");
    check(n21 > 0, "words CPU 2 -> CPU 1");
    check(n_dir_change > 0, "change of direction");
    check(n_b2b > 0, "back-to-back words");
    check(n_stall > 0, "stalled sender");
    check(n_disabled > 0, "disabled bus lines");
    check(n_blanked > 0, "blanked receive bus");
    check(n_released > 0, "wires released between words");
    check(n_contention == 0, "no wire driven from both ends");
    missing = 0;
    // levels a wire can carry: bit pair w of every possible chip sum
    // 2*ones - N (always even for even N, so wire 0 never carries odd levels)
    for (int w = 0; w < NW; w++)
      for (int l = 0; l < 4; l++) begin
        bit reachable;
        reachable = 0;
        for (int c = 0; c <= N; c++) if ((((2 * c - N) >> (2 * w)) & 3) == l) reachable = 1;
        if (reachable && lvl_seen[w][l] == 0) missing++;
      end
    check(missing == 0, "every wire at every level it can carry");
    for (int w = 0; w < NW; w++) $display("wire %0d levels %0d %0d %0d %0d", w, lvl_seen[w][0], lvl_seen[w][1], lvl_seen[w][2], lvl_seen[w][3]);
    missing = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        if (a != b && trans_seen[a][b] == 0) missing++;
    check(missing == 0, "all twelve level changes on the wires");
    $display("words 1->2 %0d, 2->1 %0d, direction changes %0d, back-to-back %0d, stalls %0d, disabled %0d, blanked %0d, idle clocks %0d",
             n12, n21, n_dir_change, n_b2b, n_stall, n_disabled, n_blanked, n_released);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// cdma_encoder_tb: drives random words through the CDMA coder and checks
// every chip sum against a Hadamard reference. Phase 1 sends words back to
// back and checks one word per S clocks and the two-clock latency from load
// to chip 0. Phase 2 stalls the coder with random out_en and checks that no
// chip is lost. Phase 3 clears the bus-line enable and checks the all-zero
// word is sent.
module cdma_encoder_tb;
  import cdma_ref_pkg::*;

  localparam int N  = 16;
  localparam int S  = 16;
  localparam int SW = $clog2(N) + 2;

  logic clk = 0;
  logic rst_n = 0;
  logic enable = 1, load = 0, out_en = 1;
  logic [N-1:0] data = '0;
  logic ready;
  logic signed [SW-1:0] sum;
  logic sum_valid, sum_first;

  int checks = 0, failures = 0;
  int cycle = 0;

  cdma_encoder #(.N(N), .S(S)) dut (.*);

  always #2500 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Scoreboard
  logic [N-1:0] sent_q[$];
  logic [N-1:0] cur;
  int k = 0;
  int chips = 0, words_out = 0;
  int last_first = -1;
  int load_cycle_q[$];
  int first_gap_bad = 0;
  bit check_gap = 0;

  always @(posedge clk) begin
    if (rst_n && load && ready) begin
      sent_q.push_back(data & {N{enable}});
      load_cycle_q.push_back(cycle);
    end
    if (rst_n && sum_valid) begin
      if (sum_first) begin
        check(sent_q.size() > 0, "chip 0 with no word sent");
        cur = sent_q.pop_front();
        if (check_gap && last_first >= 0) check(cycle - last_first == S, "one word per S clocks");
        if (check_gap) begin
          int lc;
          lc = load_cycle_q.pop_front();
          check(cycle - lc == 2, "two clocks from load to chip 0");
        end else void'(load_cycle_q.pop_front());
        last_first = cycle;
        k = 0;
      end
      check(int'(sum) == ref_sum(64'(cur), k, N, S), $sformatf("chip %0d sum %0d", k, sum));
      k++;
      chips++;
      if (k == S) words_out++;
    end
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words_in;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: back to back
    check_gap = 1;
    words_in = 0;
    @(negedge clk);
    load = 1;
    data = N'($urandom);
    while (words_in < 20) begin
      @(posedge clk);
      if (ready) begin
        words_in++;
        #1 data = N'($urandom);
      end
      @(negedge clk);
      if (words_in == 20) load = 0;
    end
    repeat (S + 4) @(posedge clk);
    check(words_out == 20, "20 words sent in phase 1");
    // Phase 2: random stalls
    check_gap = 0;
    last_first = -1;
    words_in = 0;
    @(negedge clk);
    load = 1;
    while (words_in < 20) begin
      out_en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (ready && load) words_in++;
      @(negedge clk);
      data = N'($urandom);
      if (words_in == 20) load = 0;
    end
    out_en = 1;
    repeat (S + 4) @(posedge clk);
    check(words_out == 40, "20 words sent in phase 2");
    check(chips == 40 * S, "no chip lost while stalled");
    // Phase 3: bus lines disabled
    @(negedge clk);
    enable = 0;
    load = 1;
    data = '1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    @(negedge clk);
    load = 0;
    repeat (S + 4) @(posedge clk);
    check(words_out == 41, "disabled word sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

`timescale 1ps/1ps
// cdma_decoder_tb: feeds the CDMA decoder with chip sums computed by a
// Hadamard reference for random words, checks every decoded word, that
// data_valid comes one clock after the last chip, that gaps in sum_valid are
// tolerated, and that out_en low blanks the bus.
module cdma_decoder_tb;
  import cdma_ref_pkg::*;

  localparam int N  = 16;
  localparam int S  = 16;
  localparam int SW = $clog2(N) + 2;

  logic clk = 0;
  logic rst_n = 0;
  logic signed [SW-1:0] sum = '0;
  logic sum_valid = 0, sum_first = 0, out_en = 1;
  logic [N-1:0] data;
  logic data_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  cdma_decoder #(.N(N), .S(S)) dut (.*);

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
  int last_chip_cycle = -10;
  int words_out = 0;

  // Checks run just after the falling edge, clear of the rising-edge updates.
  always @(negedge clk) begin
    #1;
    if (rst_n && data_valid) begin
      logic [N-1:0] e;
      check(exp_q.size() > 0, "word decoded with none sent");
      e = exp_q.pop_front();
      check(cycle == last_chip_cycle, "data_valid in the clock after the last chip");
      if (out_en) check(data == e, $sformatf("word %h expected %h", data, e));
      else        check(data == '0, "bus blanked while out_en low");
      words_out++;
    end
  end

  task automatic send_word(logic [N-1:0] w, bit gaps);
    exp_q.push_back(w);
    for (int k = 0; k < S; k++) begin
      if (gaps) begin
        while ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          sum_valid = 0;
          sum = SW'($urandom);
          sum_first = $urandom_range(0, 1);
        end
      end
      @(negedge clk);
      sum       = SW'(ref_sum(64'(w), k, N, S));
      sum_valid = 1;
      sum_first = (k == 0);
      @(posedge clk);
      #1;
      if (k == S - 1) last_chip_cycle = cycle;
    end
    @(negedge clk);
    sum_valid = 0;
    sum_first = 0;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_word('0, 0);
    send_word('1, 0);
    for (int i = 0; i < N; i++) send_word(N'(1) << i, 0);
    for (int i = 0; i < 30; i++) send_word(N'($urandom), 0);
    for (int i = 0; i < 30; i++) send_word(N'($urandom), 1);
    out_en = 0;
    send_word(N'($urandom) | 1, 0);
    repeat (3) @(posedge clk);
    out_en = 1;
    repeat (3) @(posedge clk);
    check(words_out == N + 63, "every word decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

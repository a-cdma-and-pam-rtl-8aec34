`timescale 1ps/1ps
// pam4_decoder_tb: 200 MHz clock. A new wire level is applied at each rising
// edge and the decoded pair {D_i+1, D_i} is checked at the next rising edge,
// for random levels covering all level changes. A second phase holds the
// clock high and checks the receiver delay of the 0 -> 1 change (446 ps):
// the decision must not move before it. Output enable low must give 00.
module pam4_decoder_tb;
  import cpia_pkg::*;

  logic clk = 0;
  logic oe = 1;
  mv_t  vin_mv = '0;
  logic d_i1, d_i;
  int checks = 0, failures = 0;
  int seen [4][4];

  pam4_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv_t lv [4] = '{12'd0, 12'd1100, 12'd2200, 12'd3300};
    int prev, cur, missing;
    prev = 0;
    // Phase 1: clocked
    for (int i = 0; i < 400; i++) begin
      cur = $urandom_range(0, 3);
      clk = 1;
      vin_mv = lv[cur];
      #2500 clk = 0;
      #2500;
      check({d_i1, d_i} == 2'(cur), $sformatf("level %0d decoded as %0d", cur, {d_i1, d_i}));
      seen[prev][cur]++;
      prev = cur;
    end
    missing = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        if (a != b && seen[a][b] == 0) missing++;
    check(missing == 0, "all twelve level changes applied");
    // Phase 2: receiver delay with the comparators tracking
    clk = 1;
    vin_mv = lv[0];
    #3000;
    check({d_i1, d_i} == 2'd0, "settled at level 0");
    vin_mv = lv[1];
    #400;
    check({d_i1, d_i} == 2'd0, "0->1 not before the receiver delay");
    #100;
    check({d_i1, d_i} == 2'd1, "0->1 after the receiver delay");
    oe = 0;
    vin_mv = lv[3];
    #1000;
    check({d_i1, d_i} == 2'd0, "blanked when oe low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// pam4_load_sweep_tb: the three line loads the 4-PAM link is characterised
// for (1, 3 and 5 pF), at 200 MHz. Three coder/decoders, one per load, each
// looped onto its own wire, send the same random symbols; every symbol must
// be decoded at the next rising edge. The time from the launching edge to the
// moment the level reaches the comparators is measured for every level
// change and must be the output-stage delay plus the receiver delay of that
// change. The slowest case, 0 -> 1 at 5 pF, must take 1300 + 446 = 1746 ps,
// which is within the 2500 ps high phase of the 200 MHz clock.
module pam4_load_sweep_tb;
  import cpia_pkg::*;

  localparam int NL = 3;
  localparam int LOADS [NL] = '{1, 3, 5};

  logic clk = 0;
  logic [1:0] tx_d = '0;
  logic tx_en = 0;
  int checks = 0, failures = 0;
  time t_edge = 0;
  int worst [NL];

  // Independent copies of the published delays, ps: [load][from][to]
  int tx_dly [NL][4][4] = '{
    '{'{0, 960, 552, 454}, '{183, 0, 704, 409}, '{275, 655, 0, 361}, '{408, 829, 900, 0}},
    '{'{0, 1175, 615, 504}, '{216, 0, 751, 445}, '{317, 796, 0, 394}, '{446, 967, 956, 0}},
    '{'{0, 1300, 670, 540}, '{240, 0, 800, 470}, '{350, 880, 0, 420}, '{480, 1090, 1000, 0}}};
  int rx_dly [4][4] = '{
    '{0, 446, 0, 437}, '{0, 0, 0, 444}, '{445, 193, 0, 439}, '{192, 203, 448, 0}};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always #2500 clk = ~clk;
  always @(posedge clk) t_edge = $time;

  int prev_sym = 0, cur_sym = 0;

  for (genvar l = 0; l < NL; l++) begin : g_load
    pam_line_t line_out;
    mv_t wire_q = '0;
    logic [1:0] rx_d;
    always @(line_out) if (line_out.drive) wire_q = line_out.mv;

    pam4_codec #(.C_LOAD_PF(LOADS[l])) u_codec (
      .clk(clk), .tx_en(tx_en), .rx_oe(1'b1), .tx_d(tx_d),
      .line_out(line_out), .line_mv(wire_q), .rx_d(rx_d)
    );

    // arrival of a new level at the comparators
    always @(u_codec.u_dec.vin_d) begin
      int dt, expect_dt;
      if (tx_en && prev_sym != cur_sym) begin
        dt = int'($time - t_edge);
        expect_dt = tx_dly[l][prev_sym][cur_sym] + rx_dly[prev_sym][cur_sym];
        check(dt == expect_dt, $sformatf("%0d pF %0d->%0d arrives at %0d ps, expected %0d",
                                         LOADS[l], prev_sym, cur_sym, dt, expect_dt));
        if (dt > worst[l]) worst[l] = dt;
      end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [4][4];
    int missing;
    @(posedge clk);
    tx_en = 1;
    #1;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      prev_sym = cur_sym;
      cur_sym = $urandom_range(0, 3);
      seen[prev_sym][cur_sym]++;
      tx_d = 2'(cur_sym);
      @(posedge clk);
      check(g_load[0].rx_d == 2'(cur_sym), "1 pF symbol decoded");
      check(g_load[1].rx_d == 2'(cur_sym), "3 pF symbol decoded");
      check(g_load[2].rx_d == 2'(cur_sym), "5 pF symbol decoded");
    end
    missing = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        if (a != b && seen[a][b] == 0) missing++;
    check(missing == 0, "all twelve level changes sent");
    check(worst[2] == 1746, $sformatf("slowest arrival at 5 pF %0d ps", worst[2]));
    check(worst[0] < worst[1] && worst[1] < worst[2], "heavier load, later arrival");
    $display("slowest arrival: 1 pF %0d ps, 3 pF %0d ps, 5 pF %0d ps", worst[0], worst[1], worst[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

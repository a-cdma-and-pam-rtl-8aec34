`timescale 1ps/1ps
// pam4_comparator_tb: checks that the comparator follows vin > vref while the
// clock is high and holds its decision while the clock is low.
module pam4_comparator_tb;
  import cpia_pkg::*;

  logic clk = 0;
  mv_t  vin_mv = '0;
  mv_t  vref_mv = 12'd1650;
  logic o;
  int checks = 0, failures = 0;

  pam4_comparator dut (.*);

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
    for (int i = 0; i < 200; i++) begin
      mv_t a, b;
      bit expect_o;
      a = mv_t'($urandom_range(0, 3300));
      b = mv_t'($urandom_range(0, 3300));
      clk = 1;
      vin_mv = a;
      #100;
      expect_o = (a > vref_mv);
      check(o == expect_o, "tracks while clk high");
      clk = 0;
      #100;
      vin_mv = b;
      #100;
      check(o == expect_o, "holds while clk low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// transmission_medium_tb: one end drives, then the other, then neither (the
// wire keeps its last voltage), then both (contention flagged).
module transmission_medium_tb;
  import cpia_pkg::*;

  pam_line_t end_a = '0, end_b = '0;
  mv_t  v_mv;
  logic contention;
  int checks = 0, failures = 0;

  transmission_medium dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv_t lv [4] = '{12'd0, 12'd1100, 12'd2200, 12'd3300};
    #10;
    check(v_mv == 0 && !contention, "idle wire starts at 0 V");
    for (int i = 0; i < 4; i++) begin
      end_a = '{drive: 1'b1, mv: lv[i]};
      #10;
      check(v_mv == lv[i] && !contention, "end A drives");
      end_a = '0;
      #10;
      check(v_mv == lv[i], "undriven wire keeps its voltage");
      end_b = '{drive: 1'b1, mv: lv[3 - i]};
      #10;
      check(v_mv == lv[3 - i] && !contention, "end B drives");
      end_b.drive = 1'b0;
      #10;
    end
    end_a = '{drive: 1'b1, mv: 12'd3300};
    end_b = '{drive: 1'b1, mv: 12'd1100};
    #10;
    check(contention, "both ends drive: contention");
    check(v_mv == 12'd2200, "mean of the two voltages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// pam4_output_stage_tb: closes each switch in turn and checks the pin voltage
// (0, 1.1, 2.2, 3.3 V) and that it appears after the 5 pF near-end delay of
// that level change and not before. Covers all twelve level changes and the
// high-impedance state with every switch open.
module pam4_output_stage_tb;
  import cpia_pkg::*;

  logic [3:0] sw_on = 4'b0000;
  pam_line_t  line;
  int checks = 0, failures = 0;

  pam4_output_stage dut (.*);   // default load: 5 pF

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // 5 pF delays in ps, independent copy: [from][to]
  int dly [4][4] = '{
    '{0,    1300, 670, 540},
    '{240,  0,    800, 470},
    '{350,  880,  0,   420},
    '{480,  1090, 1000, 0}};
  int mv [4] = '{0, 1100, 2200, 3300};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur;
    #1000;
    check(!line.drive, "starts high impedance");
    sw_on = 4'b0001;
    #5000;
    cur = 0;
    check(line.drive && line.mv == 0, "S0 drives 0 V");
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        if (a == b) continue;
        // go to a first
        if (cur != a) begin
          sw_on = 4'b0001 << a;
          #5000;
          cur = a;
        end
        sw_on = 4'b0001 << b;
        #(dly[a][b] - 20);
        check(line.mv == 12'(mv[a]), $sformatf("%0d->%0d too early", a, b));
        #40;
        check(line.drive && line.mv == 12'(mv[b]), $sformatf("%0d->%0d level", a, b));
        #5000;
        cur = b;
      end
    end
    sw_on = 4'b0000;
    #10;
    check(!line.drive, "all switches off: high impedance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

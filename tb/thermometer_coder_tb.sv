`timescale 1ps/1ps
// thermometer_coder_tb: checks the four rows of the thermometer truth table
// (000, 001, 011, 111 -> 00, 01, 10, 11) and that output enable low gives 00.
module thermometer_coder_tb;
  logic [3:1] o;
  logic oe;
  logic out2, out1;
  int checks = 0, failures = 0;

  thermometer_coder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] therm [4] = '{3'b000, 3'b001, 3'b011, 3'b111};
    for (int v = 0; v < 4; v++) begin
      o = therm[v];
      oe = 1;
      #10;
      check({out2, out1} == 2'(v), $sformatf("code %b gives %b%b", therm[v], out2, out1));
      oe = 0;
      #10;
      check({out2, out1} == 2'b00, "blanked when oe low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

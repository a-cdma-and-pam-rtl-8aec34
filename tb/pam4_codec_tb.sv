`timescale 1ps/1ps
// pam4_codec_tb: one 4-PAM coder/decoder looped onto its own wire at 200 MHz.
// A random symbol is sent at each rising edge and must be decoded at the next
// one. Then the coder is disabled and the wire must be released.
module pam4_codec_tb;
  import cpia_pkg::*;

  logic clk = 0;
  logic tx_en = 0, rx_oe = 1;
  logic [1:0] tx_d = '0;
  pam_line_t line_out;
  mv_t line_mv;
  logic [1:0] rx_d;
  int checks = 0, failures = 0;

  pam4_codec dut (.*);

  // the wire: follows the driver, keeps its voltage when released
  mv_t wire_q = '0;
  always @(line_out) if (line_out.drive) wire_q = line_out.mv;
  assign line_mv = wire_q;

  always #2500 clk = ~clk;

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
    logic [1:0] sent;
    @(posedge clk);
    tx_en = 1;
    for (int i = 0; i < 300; i++) begin
      sent = 2'($urandom);
      tx_d = sent;
      @(posedge clk);
      check(rx_d == sent, $sformatf("sent %0d received %0d", sent, rx_d));
    end
    tx_en = 0;
    #100;
    check(!line_out.drive, "wire released when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// pam4_encoder_tb: exhaustive check of the 2-to-4 decoder and the enable-gated
// buffer stage: one-hot P for each {D_i+1, D_i}, switch S_k on for level k
// when enabled, every switch off when disabled.
module pam4_encoder_tb;
  logic d_i, d_i1, en;
  logic [3:0] p, sw_on;
  int checks = 0, failures = 0;

  pam4_encoder dut (.*);

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
    // level k selected by {D_i+1, D_i} = k: 00 -> S0 (0 V) ... 11 -> S3 (3.3 V)
    logic [3:0] exp_p [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 4; v++) begin
        d_i1 = v[1];
        d_i  = v[0];
        en   = e[0];
        #10;
        check(p == exp_p[v], $sformatf("P for %0d", v));
        check(sw_on == (e ? exp_p[v] : 4'b0000), $sformatf("switches for %0d en %0d", v, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

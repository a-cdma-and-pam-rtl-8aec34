`timescale 1ps/1ps
// pam4_output_stage: BEHAVIOURAL MODEL (not synthesizable) of the analog
// output stage of the 4-PAM coder.
//
// Four switches connect the wire pin Out to a supply: S0 to ground, S1 to
// VDD1, S2 to VDD2 and S3 to VDD3, with VDD3 > VDD2 > VDD1 > 0. In silicon,
// S0 and S3 are single pass devices and S1, S2 double ones, each made of eight
// transistors in parallel. With no switch on, the pin is high impedance.
// The model gives the pin's drive as a pam_line_t: a driven flag and the
// voltage in mV.
//
// Timing: a new level appears after the 50%-to-50% delay of the level change
// at the near end of a line loaded with C_LOAD_PF (1, 3 or 5 pF). The delays
// are HSpice results for a 0.35 um CMOS process (cpia_pkg::tx_delay_ps), from
// 183 ps to 1300 ps. Rise and fall times are not modelled: the level steps.
// Releasing the pin (all switches off) takes effect at once.
// If more than one switch is on, which pam4_encoder never does, the highest
// selected level is driven.
module pam4_output_stage
  import cpia_pkg::*;
#(
  parameter int unsigned VDD1_MV   = 1100,
  parameter int unsigned VDD2_MV   = 2200,
  parameter int unsigned VDD3_MV   = 3300,
  parameter int unsigned C_LOAD_PF = 5
) (
  input  logic [3:0] sw_on,
  output pam_line_t  line
);

  pam_line_t   line_q    = '0;
  int unsigned last_lvl  = 0;   // level this stage drove last

  function automatic mv_t level_mv(input int unsigned lvl);
    case (lvl)
      3:       return mv_t'(VDD3_MV);
      2:       return mv_t'(VDD2_MV);
      1:       return mv_t'(VDD1_MV);
      default: return '0;
    endcase
  endfunction

  always @(sw_on) begin : drive_model
    int unsigned lvl;
    int unsigned d_ps;
    if (sw_on == 4'b0000) begin
      line_q <= '0;
    end else begin
      lvl = sw_on[3] ? 3 : sw_on[2] ? 2 : sw_on[1] ? 1 : 0;
      d_ps = tx_delay_ps(last_lvl, lvl, C_LOAD_PF);
      line_q <= #(d_ps) '{drive: 1'b1, mv: level_mv(lvl)};
      last_lvl = lvl;
    end
  end

  assign line = line_q;

endmodule

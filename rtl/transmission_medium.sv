`timescale 1ps/1ps
// transmission_medium: BEHAVIOURAL MODEL of one wire shared by two
// transceivers.
//
// The wire carries the voltage of whichever end drives it. When neither end
// drives, it keeps its last voltage, as the line capacitance would. It starts
// at 0 V. If both ends drive at once, the model takes the mean of the two
// voltages and raises contention; a correct protocol never does this.
// The wire adds no delay of its own: the delays measured at the near end of a
// loaded line are in pam4_output_stage. Keeping the voltage is meant, so the
// model has a latch by intent.
// Interface: end_a, end_b (each end's drive) in; v_mv (wire voltage) and
// contention out. Timing: combinational.
module transmission_medium
  import cpia_pkg::*;
(
  input  pam_line_t end_a,
  input  pam_line_t end_b,
  output mv_t       v_mv,
  output logic      contention
);

  mv_t v_q = '0;

  always_latch begin
    if (end_a.drive && end_b.drive)
      v_q = mv_t'(({1'b0, end_a.mv} + {1'b0, end_b.mv}) >> 1);
    else if (end_a.drive)
      v_q = end_a.mv;
    else if (end_b.drive)
      v_q = end_b.mv;
  end

  assign v_mv       = v_q;
  assign contention = end_a.drive && end_b.drive;

endmodule

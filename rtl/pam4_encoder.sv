`timescale 1ps/1ps
// pam4_encoder: logic part of the 4-PAM coder of one wire.
//
// A 2-to-4 decoder turns the two coded bits D_i+1 (more significant) and D_i
// into four one-hot select lines P0..P3: P_k is active when {D_i+1, D_i} = k.
// The buffer stage passes P_k to the control of output switch S_k only while
// EN is high. With EN low every switch is off and the wire is left high
// impedance. The switches then connect the wire to:
//   S0 -> 0 V, S1 -> VDD1 (1.1 V), S2 -> VDD2 (2.2 V), S3 -> VDD3 (3.3 V).
// The switches themselves are analog and are modelled in pam4_output_stage.
//
// Interface: d_i, d_i1 and en in; p (P3..P0) and sw_on (S3..S0) out.
// Timing: purely combinational.
//
// The decoder, the enable-gated buffer stage and the level of each switch
// follow the published coder. The binary order of the levels (not Gray) is
// the one the published receiver's truth table implies.
module pam4_encoder (
  input  logic       d_i,
  input  logic       d_i1,
  input  logic       en,
  output logic [3:0] p,
  output logic [3:0] sw_on
);

  // 2-to-4 decoder
  always_comb begin
    p = '0;
    p[{d_i1, d_i}] = 1'b1;
  end

  // Buffer stage: EN gates every switch control
  assign sw_on = p & {4{en}};

  // At most one switch may be closed: two would short two supplies.
  always_comb a_one_switch: assert ($onehot0(sw_on));

endmodule

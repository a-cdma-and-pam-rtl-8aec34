`timescale 1ps/1ps
// pam4_decoder: BEHAVIOURAL MODEL of the 4-PAM receiver of one wire.
//
// A resistor ladder R, 2R, 2R, R from VDD to ground gives three decision
// levels. At 3.3 V these are V1 = 0.55 V, V2 = 1.65 V and V3 = 2.75 V, midway
// between the line levels 0, 1.1, 2.2 and 3.3 V. Three clocked comparators
// C1..C3 compare the wire voltage with V1..V3 while clk is high and hold
// their decisions while clk is low. The thermometer coder turns the three
// decisions into D_i+1 (out2) and D_i (out1).
//
// Timing: the input reaches the comparators after the receiver delay of the
// level change (cpia_pkg::rx_delay_ps, 0 to 448 ps, HSpice results for a
// 0.35 um process). With a 200 MHz clock a level launched at a rising edge
// is decided during that high phase and can be sampled at the next rising
// edge.
// Interface: clk, oe (output enable) and vin_mv in; d_i1, d_i out.
//
// The ladder, the comparators and the coder follow the published receiver.
// V1 is taken from the ladder ratio (0.55 V at 3.3 V), where a stated value
// of 0.5 V would work as well.
module pam4_decoder
  import cpia_pkg::*;
#(
  parameter int unsigned VDD_MV = 3300
) (
  input  logic clk,
  input  logic oe,
  input  mv_t  vin_mv,
  output logic d_i1,
  output logic d_i
);

  // Ladder R (top), 2R, 2R, R (bottom): 6R in all.
  localparam mv_t V1_MV = mv_t'(VDD_MV * 1 / 6);
  localparam mv_t V2_MV = mv_t'(VDD_MV * 3 / 6);
  localparam mv_t V3_MV = mv_t'(VDD_MV * 5 / 6);

  mv_t         vin_d    = '0;   // input after the receiver delay
  int unsigned last_lvl = 0;
  logic [3:1]  o;

  always @(vin_mv) begin : rx_delay_model
    int unsigned lvl;
    int unsigned d_ps;
    lvl  = mv_to_level(vin_mv);
    d_ps = rx_delay_ps(last_lvl, lvl);
    vin_d <= #(d_ps) vin_mv;
    last_lvl = lvl;
  end

  pam4_comparator u_c1 (.clk(clk), .vin_mv(vin_d), .vref_mv(V1_MV), .o(o[1]));
  pam4_comparator u_c2 (.clk(clk), .vin_mv(vin_d), .vref_mv(V2_MV), .o(o[2]));
  pam4_comparator u_c3 (.clk(clk), .vin_mv(vin_d), .vref_mv(V3_MV), .o(o[3]));

  thermometer_coder u_coder (.o(o), .oe(oe), .out2(d_i1), .out1(d_i));

endmodule

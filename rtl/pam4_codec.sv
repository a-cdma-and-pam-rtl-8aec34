`timescale 1ps/1ps
// pam4_codec: BEHAVIOURAL MODEL (it holds the analog models) of the 4-PAM
// coder/decoder of one wire.
//
// The coder (pam4_encoder and pam4_output_stage) drives the wire with one of
// four levels chosen by tx_d = {D_i+1, D_i} while tx_en is high, and leaves it
// high impedance otherwise. The decoder (pam4_decoder) watches the same wire
// and returns the level it decides on as rx_d = {D_i+1, D_i}. One wire thus
// carries two coded bits per clock, either way, one direction at a time.
//
// Interface: line_out is this end's drive onto the wire; line_mv is the
// voltage actually on the wire (from transmission_medium). clk clocks the
// comparators; rx_oe enables the decoder outputs.
// Timing: the level follows tx_d after the output-stage delay (up to 1.3 ns at
// 5 pF). rx_d shows a level during the clock's high phase, after the receiver
// delay, and holds it while the clock is low.
//
// The grouping of coder and decoder on one wire is the published one. The
// separate coder enable and decoder output enable, where the published
// figure shows one shared 'output enable / clock', are this design's.
module pam4_codec
  import cpia_pkg::*;
#(
  parameter int unsigned C_LOAD_PF = 5
) (
  input  logic       clk,
  input  logic       tx_en,
  input  logic       rx_oe,
  input  logic [1:0] tx_d,
  output pam_line_t  line_out,
  input  mv_t        line_mv,
  output logic [1:0] rx_d
);

  logic [3:0] sw_on;

  pam4_encoder u_enc (
    .d_i  (tx_d[0]),
    .d_i1 (tx_d[1]),
    .en   (tx_en),
    .p    (),
    .sw_on(sw_on)
  );

  pam4_output_stage #(.C_LOAD_PF(C_LOAD_PF)) u_out (
    .sw_on(sw_on),
    .line (line_out)
  );

  pam4_decoder u_dec (
    .clk   (clk),
    .oe    (rx_oe),
    .vin_mv(line_mv),
    .d_i1  (rx_d[1]),
    .d_i   (rx_d[0])
  );

endmodule

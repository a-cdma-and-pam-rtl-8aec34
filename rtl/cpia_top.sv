`timescale 1ps/1ps
// cpia_top: CDMA and PAM interconnect between two processors. BEHAVIOURAL
// MODEL as a whole (it holds the analog 4-PAM and wire models).
//
// An N-bit bus between CPU 1 and CPU 2 is replaced by (log2 N + 2)/2 shared
// wires: 3 wires for the default N = 16. Each CPU talks to its own
// transceiver. The sending transceiver spreads the bus word over S chips by
// CDMA and sends every chip sum as four-level (4-PAM) symbols, two coded bits
// per wire and clock. The receiving transceiver decides the levels and
// despreads the sums back into the word. Words go either way, one direction
// at a time.
//
// Ports: every bus and control signal of both CPUs (prefix cpu1_/cpu2_, see
// cpia_transceiver), plus the voltage on each wire and a contention flag per
// wire, high when both ends drive it.
// Frame alignment: the receiving CPU names the clocks that carry chips
// through its rx_chip_valid/rx_chip_first inputs; tying them to the other
// side's tx_chip_valid/tx_chip_first is the simplest use.
// Timing: 200 MHz is the intended clock; the slowest level change plus
// receiver delay (1.75 ns at 5 pF) must fit in the high half of the period.
module cpia_top
  import cpia_pkg::*;
#(
  parameter int unsigned N         = N_DEF,
  parameter int unsigned S         = S_DEF,
  parameter int unsigned C_LOAD_PF = 5,
  parameter int unsigned NW        = ($clog2(N) + 2) / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // CPU 1
  input  logic         cpu1_tx_enable,
  input  logic         cpu1_tx_out_en,
  input  logic         cpu1_tx_load,
  input  logic [N-1:0] cpu1_tx_data,
  output logic         cpu1_tx_ready,
  output logic         cpu1_tx_chip_valid,
  output logic         cpu1_tx_chip_first,
  input  logic         cpu1_rx_chip_valid,
  input  logic         cpu1_rx_chip_first,
  input  logic         cpu1_rx_oe,
  output logic [N-1:0] cpu1_rx_data,
  output logic         cpu1_rx_valid,
  // CPU 2
  input  logic         cpu2_tx_enable,
  input  logic         cpu2_tx_out_en,
  input  logic         cpu2_tx_load,
  input  logic [N-1:0] cpu2_tx_data,
  output logic         cpu2_tx_ready,
  output logic         cpu2_tx_chip_valid,
  output logic         cpu2_tx_chip_first,
  input  logic         cpu2_rx_chip_valid,
  input  logic         cpu2_rx_chip_first,
  input  logic         cpu2_rx_oe,
  output logic [N-1:0] cpu2_rx_data,
  output logic         cpu2_rx_valid,
  // wires
  output mv_t          wire_mv    [NW],
  output logic [NW-1:0] contention
);

  pam_line_t drive1 [NW];
  pam_line_t drive2 [NW];

  cpia_transceiver #(.N(N), .S(S), .C_LOAD_PF(C_LOAD_PF)) u_xcvr1 (
    .clk          (clk),
    .rst_n        (rst_n),
    .tx_enable    (cpu1_tx_enable),
    .tx_out_en    (cpu1_tx_out_en),
    .tx_load      (cpu1_tx_load),
    .tx_data      (cpu1_tx_data),
    .tx_ready     (cpu1_tx_ready),
    .tx_chip_valid(cpu1_tx_chip_valid),
    .tx_chip_first(cpu1_tx_chip_first),
    .rx_chip_valid(cpu1_rx_chip_valid),
    .rx_chip_first(cpu1_rx_chip_first),
    .rx_oe        (cpu1_rx_oe),
    .rx_data      (cpu1_rx_data),
    .rx_valid     (cpu1_rx_valid),
    .line_out     (drive1),
    .line_mv      (wire_mv)
  );

  cpia_transceiver #(.N(N), .S(S), .C_LOAD_PF(C_LOAD_PF)) u_xcvr2 (
    .clk          (clk),
    .rst_n        (rst_n),
    .tx_enable    (cpu2_tx_enable),
    .tx_out_en    (cpu2_tx_out_en),
    .tx_load      (cpu2_tx_load),
    .tx_data      (cpu2_tx_data),
    .tx_ready     (cpu2_tx_ready),
    .tx_chip_valid(cpu2_tx_chip_valid),
    .tx_chip_first(cpu2_tx_chip_first),
    .rx_chip_valid(cpu2_rx_chip_valid),
    .rx_chip_first(cpu2_rx_chip_first),
    .rx_oe        (cpu2_rx_oe),
    .rx_data      (cpu2_rx_data),
    .rx_valid     (cpu2_rx_valid),
    .line_out     (drive2),
    .line_mv      (wire_mv)
  );

  for (genvar w = 0; w < NW; w++) begin : g_medium
    transmission_medium u_wire (
      .end_a     (drive1[w]),
      .end_b     (drive2[w]),
      .v_mv      (wire_mv[w]),
      .contention(contention[w])
    );
  end

endmodule

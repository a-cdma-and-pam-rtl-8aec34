`timescale 1ps/1ps
// cpia_transceiver: one end of the CDMA and PAM interconnect. BEHAVIOURAL
// MODEL as a whole, because it holds the analog 4-PAM models; the CDMA parts
// are synthesizable.
//
// Send path: the CPU's N-bit bus word enters cdma_encoder. The encoder puts
// one SW = log2(N)+2 bit chip sum per clock, S sums per word, on the coded
// lines. Bits 2w and 2w+1 of each sum go to 4-PAM coder w as D_i and D_i+1.
// Each of the SW/2 wires thus carries two coded bits per clock. The output
// stages are enabled only while a chip is being sent, so the wires are free
// for the other end the rest of the time.
// Receive path: the SW/2 4-PAM decoders decide the wire levels while the clock
// is high and hold them while it is low. The coded lines are registered at the
// next rising edge, together with the receive chip strobes, and fed to
// cdma_decoder, which returns the N-bit word.
//
// Control signals (from the CPU): tx_enable (bus enable of the encoder),
// tx_out_en (encoder output enable, low stalls), tx_load/tx_ready (word
// handshake), rx_chip_valid/rx_chip_first (which clocks carry chips of a word
// for this end, aligned with the sender's tx_chip_valid/tx_chip_first), rx_oe
// (output enable of the decoded bus). The control signal set is this design's
// choice.
// Timing: one word per S clocks each way. A word leaves tx_data two clocks
// before its first chip is on the wires, and is on rx_data at the far end two
// clocks after its last chip was sent.
module cpia_transceiver
  import cpia_pkg::*;
#(
  parameter int unsigned N         = N_DEF,
  parameter int unsigned S         = S_DEF,
  parameter int unsigned C_LOAD_PF = 5,
  parameter int unsigned SW        = $clog2(N) + 2,
  parameter int unsigned NW        = SW / 2
) (
  input  logic           clk,
  input  logic           rst_n,
  // send side
  input  logic           tx_enable,
  input  logic           tx_out_en,
  input  logic           tx_load,
  input  logic [N-1:0]   tx_data,
  output logic           tx_ready,
  output logic           tx_chip_valid,
  output logic           tx_chip_first,
  // receive side
  input  logic           rx_chip_valid,
  input  logic           rx_chip_first,
  input  logic           rx_oe,
  output logic [N-1:0]   rx_data,
  output logic           rx_valid,
  // wires
  output pam_line_t      line_out [NW],
  input  mv_t            line_mv  [NW]
);

  logic signed [SW-1:0] tx_sum;
  logic [SW-1:0]        rx_bits;
  logic signed [SW-1:0] rx_sum_q;
  logic                 rx_valid_q;
  logic                 rx_first_q;

  cdma_encoder #(.N(N), .S(S), .SW(SW)) u_cdma_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (tx_enable),
    .load     (tx_load),
    .data     (tx_data),
    .ready    (tx_ready),
    .out_en   (tx_out_en),
    .sum      (tx_sum),
    .sum_valid(tx_chip_valid),
    .sum_first(tx_chip_first)
  );

  for (genvar w = 0; w < NW; w++) begin : g_wire
    pam4_codec #(.C_LOAD_PF(C_LOAD_PF)) u_pam (
      .clk     (clk),
      .tx_en   (tx_chip_valid),
      .rx_oe   (rx_chip_valid),
      .tx_d    (tx_sum[2*w +: 2]),
      .line_out(line_out[w]),
      .line_mv (line_mv[w]),
      .rx_d    (rx_bits[2*w +: 2])
    );
  end

  // Coded lines and chip strobes are registered on the rising edge that ends
  // the chip period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sum_q   <= '0;
      rx_valid_q <= 1'b0;
      rx_first_q <= 1'b0;
    end else begin
      rx_sum_q   <= rx_bits;
      rx_valid_q <= rx_chip_valid;
      rx_first_q <= rx_chip_first;
    end
  end

  cdma_decoder #(.N(N), .S(S), .SW(SW)) u_cdma_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .sum       (rx_sum_q),
    .sum_valid (rx_valid_q),
    .sum_first (rx_first_q),
    .out_en    (rx_oe),
    .data      (rx_data),
    .data_valid(rx_valid)
  );

endmodule

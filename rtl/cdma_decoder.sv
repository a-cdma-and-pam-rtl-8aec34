`timescale 1ps/1ps
// cdma_decoder: digital CDMA decoder. It recovers N bus lines from S received
// chip sums.
//
// Every bus line has two accumulators, a positive part and a negative part.
// Each received sum is added to the positive part of line i when bit k of
// line i's spreading code is 0, and to its negative part when the bit is 1.
// After the last chip, bit i is 1 when the positive part is larger than the
// negative part. The codes are orthogonal, so with the +1/-1 chips of
// cdma_encoder the parts differ by +S (bit 1) or -S (bit 0), and all other
// lines add equally to both parts.
//
// Interface: sum is a two's-complement chip sum, taken when sum_valid is high.
// sum_first marks chip 0 of a word and clears the accumulators. Gaps in
// sum_valid (a stalled sender) are allowed. out_en is the output enable of the
// bus driver: while it is low, data reads 0.
// Timing: the word is decided from the accumulators and the last chip in the
// cycle the last chip arrives. It is on data, with a one-cycle data_valid
// strobe, on the next clock.
//
// The positive/negative accumulators and the comparison follow the published
// decoder; the sync by sum_first and the registered output are this design's
// choices. Reset is asynchronous and active low.
module cdma_decoder
  import cpia_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned S  = S_DEF,
  parameter int unsigned SW = $clog2(N) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [SW-1:0] sum,
  input  logic                 sum_valid,
  input  logic                 sum_first,
  input  logic                 out_en,
  output logic [N-1:0]         data,
  output logic                 data_valid
);

  localparam int unsigned KW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned AW = $clog2(N * S) + 2;  // holds +-N*S/2

  logic signed [AW-1:0] pos_acc [N];
  logic signed [AW-1:0] neg_acc [N];
  logic signed [AW-1:0] pos_nxt [N];
  logic signed [AW-1:0] neg_nxt [N];
  logic [KW-1:0] k;
  logic [KW-1:0] k_cur;
  logic          last_chip;
  logic [N-1:0]  data_q;
  logic [N-1:0]  decided;

  assign k_cur     = sum_first ? '0 : k;
  assign last_chip = (k_cur == KW'(S - 1));

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic signed [AW-1:0] p, n;
      p = sum_first ? '0 : pos_acc[i];
      n = sum_first ? '0 : neg_acc[i];
      if (walsh_bit(i, int'(k_cur))) n = n + AW'(sum);
      else                           p = p + AW'(sum);
      pos_nxt[i] = p;
      neg_nxt[i] = n;
      decided[i] = (p > n);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        pos_acc[i] <= '0;
        neg_acc[i] <= '0;
      end
      k          <= '0;
      data_q     <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (sum_valid) begin
        for (int unsigned i = 0; i < N; i++) begin
          pos_acc[i] <= pos_nxt[i];
          neg_acc[i] <= neg_nxt[i];
        end
        k <= k_cur + 1'b1;
        if (last_chip) begin
          data_q     <= decided;
          data_valid <= 1'b1;
        end
      end
    end
  end

  assign data = out_en ? data_q : '0;

  // sum_first is ignored on clocks without a chip. A decoded word is a
  // one-cycle strobe.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    data_valid |=> !data_valid || (S == 1));

endmodule

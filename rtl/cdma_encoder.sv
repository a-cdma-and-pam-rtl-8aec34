`timescale 1ps/1ps
// cdma_encoder: digital CDMA coder. It spreads N bus lines over S chips and
// sends their arithmetic sum.
//
// Each bus line i is XORed with its own S-chip spreading code (Walsh-Hadamard
// row i, see cpia_pkg). That gives one data chip per line and chip period.
// In every chip period the chips of all lines are added arithmetically, a chip
// of 1 counting +1 and a chip of 0 counting -1. The sum lies in -N..+N, so it
// fits in log2(N)+2 bits of two's complement. A word therefore leaves as S
// sums on SW = log2(N)+2 lines, one sum per clock.
//
// Interface: a word is taken from data when load and ready are both high.
// enable gates the bus lines: with enable low every line is coded as 0.
// out_en is the adder's output enable. While it is low, sum is 0, sum_valid is
// low and the chip sequence is held (a stall).
// Timing: chip 0 of a word appears on sum two clocks after the word is taken,
// with sum_first and sum_valid high. Chips 1..S-1 follow on the next clocks.
// ready is high again in the cycle of the last chip, so words can follow back
// to back, one word every S clocks.
//
// The XOR spreading, the per-chip addition and the bus-line enable follow the
// published architecture. The choices of this design are the signed +1/-1
// chip values, the Walsh codes, the load/ready handshake and the stall on
// out_en. Reset is asynchronous and active low. Assertions at the end check
// the chip stream: chip 0 is always a valid chip, every sum lies in -N..+N
// with the parity of N, and the output is zero between chips.
module cdma_encoder
  import cpia_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned S  = S_DEF,
  parameter int unsigned SW = $clog2(N) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 load,
  input  logic [N-1:0]         data,
  output logic                 ready,
  input  logic                 out_en,
  output logic signed [SW-1:0] sum,
  output logic                 sum_valid,
  output logic                 sum_first
);

  localparam int unsigned KW = (S > 1) ? $clog2(S) : 1;

  logic          busy;
  logic [KW-1:0] k;
  logic [N-1:0]  data_q;
  logic          last_chip;
  logic signed [SW-1:0] chip_sum;

  assign last_chip = (k == KW'(S - 1));
  assign ready     = !busy || (out_en && last_chip);

  // Sum of the +1/-1 chips of all lines for chip k: 2 * (number of 1 chips) - N.
  always_comb begin
    int ones;
    ones = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (data_q[i] ^ walsh_bit(i, int'(k))) ones++;
    end
    chip_sum = SW'(2 * ones - int'(N));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      k         <= '0;
      data_q    <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
      sum_first <= 1'b0;
    end else if (busy && out_en) begin
      sum       <= chip_sum;
      sum_valid <= 1'b1;
      sum_first <= (k == '0);
      if (last_chip) begin
        k    <= '0;
        busy <= load;
        if (load) data_q <= data & {N{enable}};
      end else begin
        k <= k + 1'b1;
      end
    end else begin
      sum       <= '0;
      sum_valid <= 1'b0;
      sum_first <= 1'b0;
      if (!busy && load) begin
        busy   <= 1'b1;
        k      <= '0;
        data_q <= data & {N{enable}};
      end
    end
  end

  // Rules of the chip stream: chip 0 is a valid chip, a sum stays in -N..+N
  // and has the parity of N, and an idle output is zero.
  a_first_is_valid: assert property (@(posedge clk) disable iff (!rst_n)
    sum_first |-> sum_valid);
  a_sum_range: assert property (@(posedge clk) disable iff (!rst_n)
    sum_valid |-> (int'(sum) >= -int'(N) && int'(sum) <= int'(N) && sum[0] == N[0]));
  a_idle_zero: assert property (@(posedge clk) disable iff (!rst_n)
    !sum_valid |-> sum == '0);

endmodule

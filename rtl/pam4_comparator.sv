`timescale 1ps/1ps
// pam4_comparator: BEHAVIOURAL MODEL of one clocked comparator unit of the
// 4-PAM receiver.
//
// In silicon the unit has a linear block and a digital block. The linear
// block is a differential pair with current-mirror loads, a current sink and
// a clock-switched bias. It is active only while CLK = 1. The digital block
// is two cross-coupled weak inverters with two 100 fF capacitors. While
// CLK = 1 they follow the linear block's outputs. While CLK = 0 the linear
// block is off and the inverters hold the charge, so the decision is kept.
//
// The model keeps that track-and-hold behaviour. While clk is high, o follows
// (vin_mv > vref_mv); while clk is low, o holds. That makes it a level-
// sensitive latch, which is intended: it is the hold phase of the unit.
// Only the non-inverted decision (Out+) is modelled.
// Interface: clk, vin_mv (non-inverting input), vref_mv (inverting input) in;
// o out.
module pam4_comparator
  import cpia_pkg::*;
(
  input  logic clk,
  input  mv_t  vin_mv,
  input  mv_t  vref_mv,
  output logic o
);

  always_latch begin
    if (clk) o = (vin_mv > vref_mv);
  end

endmodule

`timescale 1ps/1ps
// thermometer_coder: 4-to-2 coder of the 4-PAM receiver.
//
// The three comparators C3..C1 give a thermometer code o3 o2 o1 of how many
// decision levels the wire voltage exceeds: 000, 001, 011 or 111. The coder
// turns it into the two coded bits:
//   o3 o2 o1 = 000 -> out2 out1 = 00
//              001 -> 01
//              011 -> 10
//              111 -> 11
// out2 is D_i+1 and out1 is D_i. The logic is out2 = o2 and
// out1 = o3 | (o1 & ~o2). The truth table is the published one. The minimal
// logic, and what it gives for the four codes that cannot occur, are this
// design's. oe is the output enable: while it is low both outputs read 0.
// Timing: combinational.
module thermometer_coder (
  input  logic [3:1] o,
  input  logic       oe,
  output logic       out2,
  output logic       out1
);

  assign out2 = oe & o[2];
  assign out1 = oe & (o[3] | (o[1] & ~o[2]));

endmodule

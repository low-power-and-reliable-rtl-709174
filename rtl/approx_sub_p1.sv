// approx_sub_p1: Proposed-1 approximate 1-bit subtractor.
//
// A cell that trades accuracy for a very small circuit (10 transistors in a
// gate-diffusion-input style in the source design). Its logic function is
//   bout = ~x | (y & bin)
//   d    = ~x | y
// Both outputs are built around the inverted minuend bit ~x. Against the
// exact subtractor it is wrong for 4 of the 8 input combinations
// (xyb = 000, 011, 100, 110), and each wrong result is off by exactly one
// (the value d - 2*bout differs by 1): error rate 0.5, normalised mean error
// distance 1/6, mean relative error distance 0.4375.
// The error figures follow the source design; the two equations are this
// implementation's reading of its truth table, chosen as the function
// closest to that table that has those error figures.
// Purely combinational, no clock.
module approx_sub_p1 (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic d,
  output logic bout
);
  logic xn;
  assign xn   = ~x;
  assign bout = xn | (y & bin);
  assign d    = xn | y;
endmodule

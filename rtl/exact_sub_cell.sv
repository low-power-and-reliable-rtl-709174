// exact_sub_cell: exact 1-bit full subtractor.
//
// Computes x - y - bin as a two-bit result {bout, d} whose value is
// d - 2*bout:  d = x ^ y ^ bin,  bout = (~x & y) | (~(x ^ y) & bin).
// This is the reference cell against which the approximate cells are
// measured, and it fills the positions of a multi-bit subtractor or divider
// row that are not approximated. Purely combinational, no clock.
module exact_sub_cell (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic d,
  output logic bout
);
  logic xy;
  assign xy   = x ^ y;
  assign d    = xy ^ bin;
  assign bout = (~x & y) | (~xy & bin);
endmodule

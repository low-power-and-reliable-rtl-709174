// ripple_sub: N-bit ripple-borrow subtractor with approximate low bits.
//
// Computes a - b - bin with a chain of N 1-bit subtractor cells, the borrow
// of each cell feeding the next more significant one. The DEPTH least
// significant cells are approximate cells of kind APPROX (Proposed-1 or
// Proposed-2); the N-DEPTH upper cells are exact. With DEPTH = 0 the result
// is exact: diff = (a - b - bin) mod 2^N and bout = 1 when a < b + bin.
// The deeper the approximate part, the more often and the larger the error.
// In this design it forms the pixel difference of two images and each row of
// the array divider. Purely combinational: the borrow ripples through all
// N cells in one evaluation.
module ripple_sub
  import sub_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned DEPTH  = 4,
  parameter cell_kind_e  APPROX = CELL_PROPOSED1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         bin,
  output logic [N-1:0] diff,
  output logic         bout
);
  logic [N:0] borrow;
  assign borrow[0] = bin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam cell_kind_e K = (i < DEPTH) ? APPROX : CELL_EXACT;
    sub_cell #(.KIND(K)) u_cell (
      .x   (a[i]),
      .y   (b[i]),
      .bin (borrow[i]),
      .d   (diff[i]),
      .bout(borrow[i+1])
    );
  end

  assign bout = borrow[N];
endmodule

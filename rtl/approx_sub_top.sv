// approx_sub_top: the two approximate subtractors in their applications.
//
// The design offers two approximate 1-bit subtractor cells, Proposed-1 and
// Proposed-2, meant to replace exact cells in image-processing datapaths.
// This top places both of them side by side, each in the two datapaths the
// design names:
//   * an unsigned non-restoring array divider (2*DIV_N / DIV_N bits) whose
//     cells are approximated by the replacement pattern DIV_PATTERN with
//     depth DIV_DEPTH, used for pixel division and ratio-based change
//     detection;
//   * a PIX_W-bit ripple subtractor whose PIX_DEPTH low bits are
//     approximate, giving the difference of two image pixels.
// Lane 1 uses Proposed-1 cells, lane 2 Proposed-2 cells; both lanes see the
// same inputs so that their results can be compared directly.
// Fully combinational: outputs follow the inputs after the ripple delay of
// the divider array, with no clock or reset.
// The parameter defaults (8-bit pixels, a 16/8 divider, a vertical pattern,
// depth 4) are this implementation's choice.
module approx_sub_top
  import sub_pkg::*;
#(
  parameter int unsigned   DIV_N       = 8,
  parameter repl_pattern_e DIV_PATTERN = PAT_VERTICAL,
  parameter int unsigned   DIV_DEPTH   = 4,
  parameter int unsigned   PIX_W       = 8,
  parameter int unsigned   PIX_DEPTH   = 4
) (
  // divider inputs (shared by both lanes)
  input  logic [2*DIV_N-1:0] dividend,
  input  logic [DIV_N-1:0]   divisor,
  // pixel-difference inputs (shared by both lanes): pix_a - pix_b
  input  logic [PIX_W-1:0]   pix_a,
  input  logic [PIX_W-1:0]   pix_b,
  // lane 1: Proposed-1 cells
  output logic [DIV_N-1:0]   p1_quotient,
  output logic [DIV_N-1:0]   p1_remainder,
  output logic [PIX_W-1:0]   p1_pix_diff,
  output logic               p1_pix_borrow,
  // lane 2: Proposed-2 cells
  output logic [DIV_N-1:0]   p2_quotient,
  output logic [DIV_N-1:0]   p2_remainder,
  output logic [PIX_W-1:0]   p2_pix_diff,
  output logic               p2_pix_borrow,
  // quotient does not fit in DIV_N bits (same for both lanes)
  output logic               div_overflow
);
  logic p2_overflow_unused;

  nr_divider #(.N(DIV_N), .PATTERN(DIV_PATTERN), .DEPTH(DIV_DEPTH),
               .APPROX(CELL_PROPOSED1)) u_div_p1 (
    .dividend (dividend),
    .divisor  (divisor),
    .quotient (p1_quotient),
    .remainder(p1_remainder),
    .overflow (div_overflow)
  );

  nr_divider #(.N(DIV_N), .PATTERN(DIV_PATTERN), .DEPTH(DIV_DEPTH),
               .APPROX(CELL_PROPOSED2)) u_div_p2 (
    .dividend (dividend),
    .divisor  (divisor),
    .quotient (p2_quotient),
    .remainder(p2_remainder),
    .overflow (p2_overflow_unused)
  );

  ripple_sub #(.N(PIX_W), .DEPTH(PIX_DEPTH), .APPROX(CELL_PROPOSED1)) u_pix_p1 (
    .a   (pix_a),
    .b   (pix_b),
    .bin (1'b0),
    .diff(p1_pix_diff),
    .bout(p1_pix_borrow)
  );

  ripple_sub #(.N(PIX_W), .DEPTH(PIX_DEPTH), .APPROX(CELL_PROPOSED2)) u_pix_p2 (
    .a   (pix_a),
    .b   (pix_b),
    .bin (1'b0),
    .diff(p2_pix_diff),
    .bout(p2_pix_borrow)
  );
endmodule

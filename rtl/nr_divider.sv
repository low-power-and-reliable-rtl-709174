// nr_divider: unsigned non-restoring array divider with approximate cells.
//
// Divides a 2N-bit dividend by an N-bit divisor, giving an N-bit quotient and
// an N-bit remainder, in one combinational pass through N rows of N+1
// subtractor cells plus an N-bit remainder-correction row.
//
// Row r (r = 0 at the top) takes the previous partial remainder P (N+1 bits,
// two's complement, starting from the upper half of the dividend), shifts it
// left while bringing in dividend bit N-1-r, and then either subtracts the
// divisor (P was >= 0) or adds it back (P was negative): the non-restoring
// rule, which never restores a remainder inside the array. Each row is a
// ripple subtractor used as a controlled add/subtract unit: it computes
// S - (B ^ {add}) - add, which is S - B when add = 0 and S + B when
// add = 1 (two's complement: S - ~B - 1 = S + B). Quotient bit N-1-r is 1
// when the new partial remainder is not negative. After the last row a
// negative remainder is corrected by adding the divisor once.
//
// PATTERN and DEPTH choose which cells of the array are approximate cells of
// kind APPROX (see sub_pkg::row_depth); all other cells, and the correction
// row, are exact. With DEPTH = 0 the divider is exact whenever
// overflow = 0.
//
// overflow is 1 when the upper half of the dividend is not below the divisor
// (this includes a zero divisor): the quotient then does not fit in N bits
// and quotient/remainder are meaningless. It is computed exactly.
//
// The non-restoring structure, the use of the approximate cells in it and
// the four pattern names follow the source design; the array layout, the
// placement rule of each pattern, the exact correction row and the overflow
// flag are this implementation's choices. Combinational, no clock.
module nr_divider
  import sub_pkg::*;
#(
  parameter int unsigned   N       = 8,
  parameter repl_pattern_e PATTERN = PAT_VERTICAL,
  parameter int unsigned   DEPTH   = 4,
  parameter cell_kind_e    APPROX  = CELL_PROPOSED1
) (
  input  logic [2*N-1:0] dividend,
  input  logic [N-1:0]   divisor,
  output logic [N-1:0]   quotient,
  output logic [N-1:0]   remainder,
  output logic           overflow
);
  localparam int unsigned W = N + 1;

  // partial remainders: prem[0] is the upper dividend half, prem[r+1] the
  // output of row r
  logic [W-1:0] prem [N+1];
  assign prem[0] = {1'b0, dividend[2*N-1:N]};

  for (genvar r = 0; r < N; r++) begin : g_row
    localparam int unsigned RD = row_depth(PATTERN, DEPTH, r, N, W);
    logic         add;
    logic [W-1:0] shifted;
    logic [W-1:0] operand;
    logic         unused_bout;

    assign add     = prem[r][W-1];
    assign shifted = {prem[r][W-2:0], dividend[N-1-r]};
    assign operand = {1'b0, divisor} ^ {W{add}};

    ripple_sub #(.N(W), .DEPTH(RD), .APPROX(APPROX)) u_row (
      .a   (shifted),
      .b   (operand),
      .bin (add),
      .diff(prem[r+1]),
      .bout(unused_bout)
    );

    assign quotient[N-1-r] = ~prem[r+1][W-1];
  end

  // remainder correction: add the divisor back once if the last partial
  // remainder is negative (computed as P - ~B - 1 = P + B)
  logic [N-1:0] corrected;
  logic         unused_corr_bout;
  ripple_sub #(.N(N), .DEPTH(0), .APPROX(CELL_EXACT)) u_correct (
    .a   (prem[N][N-1:0]),
    .b   (~divisor),
    .bin (1'b1),
    .diff(corrected),
    .bout(unused_corr_bout)
  );

  assign remainder = prem[N][W-1] ? corrected : prem[N][N-1:0];
  assign overflow  = (dividend[2*N-1:N] >= divisor);
endmodule

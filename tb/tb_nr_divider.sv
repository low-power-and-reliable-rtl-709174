// tb_nr_divider: self-checking test of the non-restoring array divider.
//
// An exact instance (DEPTH 0) is checked against integer / and % for every
// input whose quotient fits, and its overflow flag against the definition.
// Eight approximate instances (the four replacement patterns, each with
// Proposed-1 and Proposed-2 cells, depth 4) are checked bit for bit against
// the row-by-row model in tb_sub_model_pkg; for the patterns that only
// touch the bottom rows, the upper quotient bits must equal the exact ones.
// Inputs: directed corner cases, then random dividends and divisors, mostly
// in the non-overflow range.
// The test counts negative partial remainders at the last row (the
// remainder correction), overflow cases and approximate results that differ
// from the exact ones, and fails if any of them never occurs.
// Ends with a TB_RESULT line; a watchdog stops it.
module tb_nr_divider;
  import sub_pkg::*;
  import tb_sub_model_pkg::*;

  localparam int N = 8;
  localparam int D = 4;
  localparam int VECTORS = 40000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [2*N-1:0] dividend;
  logic [N-1:0]   divisor;
  logic [N-1:0]   q_ex, r_ex;
  logic           ovf_ex;
  logic [N-1:0]   q_ap [8];
  logic [N-1:0]   r_ap [8];
  logic           ovf_ap [8];
  int checks = 0, failures = 0;
  int n_corr = 0, n_ovf = 0, n_approx_diff = 0;

  nr_divider #(.N(N), .PATTERN(PAT_VERTICAL), .DEPTH(0), .APPROX(CELL_EXACT)) dut_ex (
    .dividend(dividend), .divisor(divisor), .quotient(q_ex), .remainder(r_ex),
    .overflow(ovf_ex));

  for (genvar g = 0; g < 8; g++) begin : g_ap
    localparam repl_pattern_e PAT = repl_pattern_e'(g % 4);
    localparam cell_kind_e    K   = (g < 4) ? CELL_PROPOSED1 : CELL_PROPOSED2;
    nr_divider #(.N(N), .PATTERN(PAT), .DEPTH(D), .APPROX(K)) dut (
      .dividend(dividend), .divisor(divisor), .quotient(q_ap[g]),
      .remainder(r_ap[g]), .overflow(ovf_ap[g]));
  end

  initial begin
    repeat (VECTORS * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [2*N-1:0] dd, logic [N-1:0] dv);
    logic ovf;
    dividend = dd;
    divisor  = dv;
    #1;
    ovf = dd[2*N-1:N] >= dv;
    checks++;
    if (ovf_ex !== ovf) begin
      failures++;
      $display("overflow flag %b for %0d / %0d", ovf_ex, dd, dv);
    end
    if (ovf) n_ovf++;
    if (!ovf) begin
      checks++;
      if (q_ex !== N'(dd / dv) || r_ex !== N'(dd % dv)) begin
        failures++;
        if (failures < 10)
          $display("exact: %0d / %0d gave q=%0d r=%0d", dd, dv, q_ex, r_ex);
      end
      // the last partial remainder of the exact array was negative, so the
      // correction row added the divisor back
      if (negative_rows(N, longint'(dd), longint'(dv)) >> (N - 1) & 1) n_corr++;
    end
    for (int g = 0; g < 8; g++) begin
      longint unsigned m;
      m = divide(N, g % 4, D, (g < 4) ? 1 : 2, longint'(dd), longint'(dv));
      checks++;
      if (q_ap[g] !== m[N-1:0] || r_ap[g] !== m[2*N-1:N] || ovf_ap[g] !== ovf) begin
        failures++;
        if (failures < 10)
          $display("inst %0d: %0d / %0d gave q=%0d r=%0d, model q=%0d r=%0d",
                   g, dd, dv, q_ap[g], r_ap[g], m[N-1:0], m[2*N-1:N]);
      end
      if (!ovf && (q_ap[g] != q_ex || r_ap[g] != r_ex)) n_approx_diff++;
      // horizontal, square and triangular patterns leave the rows above the
      // bottom D rows exact, so the upper quotient bits must be exact
      if (!ovf && (g % 4) != 0) begin
        checks++;
        if (q_ap[g][N-1:D] !== q_ex[N-1:D]) begin
          failures++;
          if (failures < 10)
            $display("inst %0d: upper quotient bits %b, exact %b", g, q_ap[g][N-1:D], q_ex[N-1:D]);
        end
      end
    end
    @(posedge clk);
  endtask

  initial begin
    check_one(16'd0, 8'd1);
    check_one(16'd255, 8'd1);
    check_one(16'hFEFF, 8'hFF);
    check_one(16'd1000, 8'd7);
    check_one(16'd100, 8'd0);
    check_one(16'h0800, 8'h08);
    for (int i = 0; i < VECTORS; i++) begin
      logic [N-1:0]   dv;
      logic [2*N-1:0] dd;
      dv = N'($urandom);
      dd = (2 * N)'($urandom);
      // keep most cases inside the range where the quotient fits
      if ((i % 8) != 0 && dv != 0) dd[2*N-1:N] = N'(dd[2*N-1:N] % dv);
      check_one(dd, dv);
    end
    checks++;
    if (n_corr == 0 || n_ovf == 0 || n_approx_diff == 0) begin
      failures++;
      $display("mechanism not exercised: corrections %0d overflows %0d approx diffs %0d",
               n_corr, n_ovf, n_approx_diff);
    end
    $display("remainder corrections %0d, overflows %0d, approximate results off %0d",
             n_corr, n_ovf, n_approx_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

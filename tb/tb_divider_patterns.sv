// tb_divider_patterns: error of the approximate divider by pattern and depth.
//
// Instantiates nr_divider (16/8 bits) for every combination of the four
// replacement patterns, depths 1 to 4 and the two approximate cells (32
// instances), feeds all of them the same random in-range divisions, and
// measures for each the error rate (share of divisions whose quotient or
// remainder differs from exact division) and the mean relative error of the
// quotient. Every instance is also checked bit for bit against the
// row-by-row model. A deeper approximation must not lower the error rate:
// for each pattern and cell the error rate may not fall as the depth grows.
// Ends with a TB_RESULT line; a watchdog stops it.
module tb_divider_patterns;
  import sub_pkg::*;
  import tb_sub_model_pkg::*;

  localparam int N = 8;
  localparam int NI = 32;          // instances: cell x pattern x depth
  localparam int VECTORS = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [2*N-1:0] dividend;
  logic [N-1:0]   divisor;
  logic [N-1:0]   q [NI];
  logic [N-1:0]   r [NI];
  logic           ovf [NI];
  int checks = 0, failures = 0;
  int wrong [NI];
  real rel_err [NI];

  // instance i: cell = i / 16, pattern = (i / 4) % 4, depth = i % 4 + 1
  for (genvar i = 0; i < NI; i++) begin : g_inst
    localparam cell_kind_e    K   = (i < 16) ? CELL_PROPOSED1 : CELL_PROPOSED2;
    localparam repl_pattern_e PAT = repl_pattern_e'((i / 4) % 4);
    localparam int unsigned   DEP = i % 4 + 1;
    nr_divider #(.N(N), .PATTERN(PAT), .DEPTH(DEP), .APPROX(K)) dut (
      .dividend(dividend), .divisor(divisor), .quotient(q[i]),
      .remainder(r[i]), .overflow(ovf[i]));
  end

  initial begin
    repeat (VECTORS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) begin
      wrong[i]   = 0;
      rel_err[i] = 0.0;
    end
    for (int v = 0; v < VECTORS; v++) begin
      logic [N-1:0] dv;
      logic [2*N-1:0] dd;
      int eq, er;
      dv = N'($urandom_range(255, 1));
      dd = (2 * N)'($urandom);
      dd[2*N-1:N] = N'(dd[2*N-1:N] % dv);
      dividend = dd;
      divisor  = dv;
      @(posedge clk);
      eq = int'(dd) / int'(dv);
      er = int'(dd) % int'(dv);
      for (int i = 0; i < NI; i++) begin
        longint unsigned m;
        m = divide(N, (i / 4) % 4, i % 4 + 1, (i < 16) ? 1 : 2, longint'(dd), longint'(dv));
        checks++;
        if ({r[i], q[i]} !== m[2*N-1:0] || ovf[i] !== 1'b0) begin
          failures++;
          if (failures < 10) $display("inst %0d: %0d / %0d gave q=%0d r=%0d", i, dd, dv, q[i], r[i]);
        end
        if (int'(q[i]) != eq || int'(r[i]) != er) wrong[i]++;
        rel_err[i] += real'((int'(q[i]) > eq) ? int'(q[i]) - eq : eq - int'(q[i])) /
                      real'((eq == 0) ? 1 : eq);
      end
    end
    for (int c = 0; c < 2; c++) begin
      for (int p = 0; p < 4; p++) begin
        string line;
        line = $sformatf("Proposed-%0d %-10s", c + 1,
                         (p == 0) ? "vertical" : (p == 1) ? "horizontal" :
                         (p == 2) ? "square" : "triangle");
        for (int dep = 1; dep <= 4; dep++) begin
          int i;
          i = c * 16 + p * 4 + dep - 1;
          line = {line, $sformatf("  d=%0d ER %0.3f MRED(q) %0.4f", dep,
                                  real'(wrong[i]) / real'(VECTORS),
                                  rel_err[i] / real'(VECTORS))};
          if (dep > 1) begin
            checks++;
            if (wrong[i] < wrong[i-1]) begin
              failures++;
              $display("error rate fell from depth %0d to %0d (cell %0d pattern %0d)",
                       dep - 1, dep, c + 1, p);
            end
          end
        end
        $display("%s", line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

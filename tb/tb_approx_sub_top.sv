// tb_approx_sub_top: end-to-end test of approx_sub_top at its default sizes.
//
// Drives the shared inputs of the two lanes and checks every output:
//   * pixel difference: all 65536 pixel pairs; each lane is compared with
//     the bit-level model (4 approximate low cells of its kind) and the
//     borrow with the model's borrow;
//   * divider: directed corner cases and random dividend/divisor pairs;
//     each lane is compared with the row-by-row model of a 16/8
//     non-restoring array divider with a vertical pattern of depth 4, and
//     the overflow flag with its definition.
// Mechanisms counted (from the exact arithmetic of the same inputs), each of which must occur at least once: a divider row
// adding the divisor back (non-restoring add cycle), the final remainder
// correction, the overflow flag, a negative pixel difference (borrow out),
// and approximate results of each lane that differ from exact arithmetic.
// Ends with a TB_RESULT line; a watchdog stops it.
module tb_approx_sub_top;
  import tb_sub_model_pkg::*;

  localparam int N  = 8;   // divider divisor width (top default)
  localparam int PW = 8;   // pixel width (top default)
  localparam int DD = 4;   // divider depth (top default)
  localparam int PD = 4;   // pixel subtractor depth (top default)
  localparam int DIV_VECTORS = 50000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [2*N-1:0] dividend;
  logic [N-1:0]   divisor;
  logic [PW-1:0]  pix_a, pix_b;
  logic [N-1:0]   p1_q, p1_r, p2_q, p2_r;
  logic [PW-1:0]  p1_d, p2_d;
  logic           p1_b, p2_b, ovf;

  int checks = 0, failures = 0;
  int n_addrow = 0, n_corr = 0, n_ovf = 0, n_neg_pix = 0;
  int n_p1_off = 0, n_p2_off = 0, n_p1_pix_off = 0, n_p2_pix_off = 0;

  approx_sub_top dut (
    .dividend(dividend), .divisor(divisor), .pix_a(pix_a), .pix_b(pix_b),
    .p1_quotient(p1_q), .p1_remainder(p1_r), .p1_pix_diff(p1_d), .p1_pix_borrow(p1_b),
    .p2_quotient(p2_q), .p2_remainder(p2_r), .p2_pix_diff(p2_d), .p2_pix_borrow(p2_b),
    .div_overflow(ovf));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_div(logic [2*N-1:0] dd, logic [N-1:0] dv);
    longint unsigned m1, m2;
    logic exp_ovf;
    dividend = dd;
    divisor  = dv;
    @(posedge clk);
    exp_ovf = dd[2*N-1:N] >= dv;
    m1 = divide(N, 0, DD, 1, longint'(dd), longint'(dv));
    m2 = divide(N, 0, DD, 2, longint'(dd), longint'(dv));
    checks += 3;
    if (ovf !== exp_ovf) begin
      failures++;
      $display("overflow %b for %0d / %0d", ovf, dd, dv);
    end
    if ({p1_r, p1_q} !== m1[2*N-1:0]) begin
      failures++;
      if (failures < 10) $display("P1 lane: %0d / %0d gave q=%0d r=%0d", dd, dv, p1_q, p1_r);
    end
    if ({p2_r, p2_q} !== m2[2*N-1:0]) begin
      failures++;
      if (failures < 10) $display("P2 lane: %0d / %0d gave q=%0d r=%0d", dd, dv, p2_q, p2_r);
    end
    if (exp_ovf) n_ovf++;
    else begin
      if (p1_q != N'(dd / dv) || p1_r != N'(dd % dv)) n_p1_off++;
      if (p2_q != N'(dd / dv) || p2_r != N'(dd % dv)) n_p2_off++;
    end
    if (!exp_ovf) begin
      longint unsigned neg;
      neg = negative_rows(N, longint'(dd), longint'(dv));
      for (int r = 0; r < N - 1; r++) if (neg[r]) n_addrow++;
      if (neg[N-1]) n_corr++;
    end
  endtask

  initial begin
    dividend = '0;
    divisor  = 8'd1;
    // pixel difference, every pair
    for (int i = 0; i < (1 << (2 * PW)); i++) begin
      longint unsigned m1, m2;
      {pix_a, pix_b} = (2 * PW)'(i);
      #1;
      m1 = ripple(PW, PD, 1, longint'(pix_a), longint'(pix_b), 1'b0);
      m2 = ripple(PW, PD, 2, longint'(pix_a), longint'(pix_b), 1'b0);
      checks += 2;
      if ({p1_b, p1_d} !== m1[PW:0]) begin
        failures++;
        if (failures < 10) $display("P1 pixel: %0d - %0d gave %b_%0d", pix_a, pix_b, p1_b, p1_d);
      end
      if ({p2_b, p2_d} !== m2[PW:0]) begin
        failures++;
        if (failures < 10) $display("P2 pixel: %0d - %0d gave %b_%0d", pix_a, pix_b, p2_b, p2_d);
      end
      if (pix_a < pix_b) n_neg_pix++;
      if ({p1_b, p1_d} != (PW + 1)'(int'(pix_a) - int'(pix_b))) n_p1_pix_off++;
      if ({p2_b, p2_d} != (PW + 1)'(int'(pix_a) - int'(pix_b))) n_p2_pix_off++;
    end
    // divider
    check_div(16'd0, 8'd1);
    check_div(16'hFEFF, 8'hFF);
    check_div(16'd1000, 8'd7);
    check_div(16'd100, 8'd0);
    for (int i = 0; i < DIV_VECTORS; i++) begin
      logic [N-1:0]   dv;
      logic [2*N-1:0] dd;
      dv = N'($urandom);
      dd = (2 * N)'($urandom);
      if ((i % 8) != 0 && dv != 0) dd[2*N-1:N] = N'(dd[2*N-1:N] % dv);
      check_div(dd, dv);
    end
    $display("divider add-back rows %0d, remainder corrections %0d, overflows %0d",
             n_addrow, n_corr, n_ovf);
    $display("negative pixel differences %0d", n_neg_pix);
    $display("approximate vs exact: P1 div %0d, P2 div %0d, P1 pixel %0d, P2 pixel %0d",
             n_p1_off, n_p2_off, n_p1_pix_off, n_p2_pix_off);
    checks++;
    if (n_addrow == 0 || n_corr == 0 || n_ovf == 0 || n_neg_pix == 0 ||
        n_p1_off == 0 || n_p2_off == 0 || n_p1_pix_off == 0 || n_p2_pix_off == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

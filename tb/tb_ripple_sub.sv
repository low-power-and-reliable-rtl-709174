// tb_ripple_sub: exhaustive self-checking test of ripple_sub.
//
// Three 8-bit instances are driven with every (a, b, bin) combination:
// an exact one (DEPTH 0), checked against a - b - bin computed with integer
// arithmetic; one with 3 low Proposed-1 cells; and one made entirely of
// Proposed-2 cells. The approximate instances are checked against the
// bit-level model in tb_sub_model_pkg. The test also counts how many inputs
// give a wrong result in the approximate instances and requires that some
// do and that all do when every cell is approximate in the ways predicted.
// Ends with a TB_RESULT line; a watchdog stops it.
module tb_ripple_sub;
  import sub_pkg::*;
  import tb_sub_model_pkg::*;

  localparam int N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b;
  logic         bin;
  logic [N-1:0] d_ex, d_p1, d_p2;
  logic         bo_ex, bo_p1, bo_p2;
  int checks = 0, failures = 0;
  int wrong_p1 = 0, wrong_p2 = 0;

  ripple_sub #(.N(N), .DEPTH(0), .APPROX(CELL_EXACT)) dut_ex (
    .a(a), .b(b), .bin(bin), .diff(d_ex), .bout(bo_ex));
  ripple_sub #(.N(N), .DEPTH(3), .APPROX(CELL_PROPOSED1)) dut_p1 (
    .a(a), .b(b), .bin(bin), .diff(d_p1), .bout(bo_p1));
  ripple_sub #(.N(N), .DEPTH(N), .APPROX(CELL_PROPOSED2)) dut_p2 (
    .a(a), .b(b), .bin(bin), .diff(d_p2), .bout(bo_p2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N + 1)); i++) begin
      int exact_val;
      longint unsigned m1, m2;
      {bin, a, b} = (2 * N + 1)'(i);
      #1;
      exact_val = int'(a) - int'(b) - int'(bin);
      checks++;
      if ({bo_ex, d_ex} !== (N + 1)'(exact_val)) begin
        failures++;
        if (failures < 10) $display("exact: %0d-%0d-%0d gave %b_%h", a, b, bin, bo_ex, d_ex);
      end
      m1 = ripple(N, 3, 1, longint'(a), longint'(b), bin);
      m2 = ripple(N, N, 2, longint'(a), longint'(b), bin);
      checks++;
      if ({bo_p1, d_p1} !== m1[N:0]) begin
        failures++;
        if (failures < 10) $display("P1 d3: %0d-%0d-%0d gave %b_%h, model %h", a, b, bin, bo_p1, d_p1, m1);
      end
      checks++;
      if ({bo_p2, d_p2} !== m2[N:0]) begin
        failures++;
        if (failures < 10) $display("P2 d8: %0d-%0d-%0d gave %b_%h, model %h", a, b, bin, bo_p2, d_p2, m2);
      end
      if ({bo_p1, d_p1} != (N + 1)'(exact_val)) wrong_p1++;
      if ({bo_p2, d_p2} != (N + 1)'(exact_val)) wrong_p2++;
    end
    // the approximation must show, and a deeper one must err more often
    checks++;
    if (wrong_p1 == 0 || wrong_p2 <= wrong_p1) begin
      failures++;
      $display("unexpected error counts: P1 depth 3 %0d, P2 depth 8 %0d", wrong_p1, wrong_p2);
    end
    $display("wrong results: P1 depth 3: %0d, P2 depth 8: %0d of %0d",
             wrong_p1, wrong_p2, 1 << (2 * N + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

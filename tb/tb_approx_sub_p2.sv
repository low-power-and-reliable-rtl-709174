// tb_approx_sub_p2: exhaustive self-checking test of approx_sub_p2.
//
// Applies all 8 combinations of (x, y, bin), one per clock cycle, and
// compares {bout, d} with the cell's truth table written out below
// (bout = ~x | y&bin, d = ~x | bin). It also measures the cell against exact subtraction x - y - bin
// (the value of a result is d - 2*bout) and checks the error figures:
// number of wrong combinations, total error distance and total relative
// error distance (distance divided by |exact value|, or by 1 when the
// exact value is 0). Ends with a TB_RESULT line; a watchdog stops it.
module tb_approx_sub_p2;
  // expected outputs, bit i = input combination i = {x, y, bin}
  localparam logic [7:0] EXP_BOUT = 8'b10001111;
  localparam logic [7:0] EXP_D    = 8'b10101111;
  localparam int ERR_COUNT = 4;     // error rate 0.5
  localparam real MRED   = 0.4375;
  localparam int ED_SUM    = 4;     // NMED = ED_SUM / 8 / 3 = 1/6

  logic clk;
  initial clk = 1'b0;
  logic x, y, bin, d, bout;
  int checks = 0, failures = 0;
  int errs = 0, ed_sum = 0;
  real red_sum = 0.0;

  approx_sub_p2 dut (.x(x), .y(y), .bin(bin), .d(d), .bout(bout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ex, ap, ed;
      {x, y, bin} = 3'(i);
      @(posedge clk);
      checks++;
      if (bout !== EXP_BOUT[i] || d !== EXP_D[i]) begin
        failures++;
        $display("xyb=%03b: got bout=%b d=%b, expected bout=%b d=%b",
                 3'(i), bout, d, EXP_BOUT[i], EXP_D[i]);
      end
      ex   = int'(x) - int'(y) - int'(bin);
      ap   = int'(d) - 2 * int'(bout);
      ed = (ap > ex) ? ap - ex : ex - ap;
      if (ed != 0) errs++;
      ed_sum  += ed;
      red_sum += real'(ed) / ((ex == 0) ? 1.0 : ((ex < 0) ? -real'(ex) : real'(ex)));
    end
    checks++;
    if (errs != ERR_COUNT) begin
      failures++;
      $display("error count %0d, expected %0d", errs, ERR_COUNT);
    end
    checks++;
    if (ed_sum != ED_SUM) begin
      failures++;
      $display("total error distance %0d, expected %0d", ed_sum, ED_SUM);
    end
    checks++;
    if (red_sum / 8.0 < MRED - 0.0001 || red_sum / 8.0 > MRED + 0.0001) begin
      failures++;
      $display("MRED %f, expected %f", red_sum / 8.0, MRED);
    end
    $display("ER=%0.3f NMED=%0.4f MRED=%0.4f", real'(errs) / 8.0,
             real'(ed_sum) / 24.0, red_sum / 8.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

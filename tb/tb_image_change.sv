// tb_image_change: change detection between two images with both lanes.
//
// Workload test for the pixel-difference datapath of approx_sub_top at its
// default sizes (8-bit pixels, 4 approximate low cells). Two 128x128
// grey-scale images are generated here: image A is a smooth pattern with
// values in 40..170; image B is A plus random noise of at most +-8 grey
// levels, and inside a 32x24 rectangle A plus 80 (the "change"). Each pixel
// pair is sent through the top; the signed difference {borrow, diff} of
// each lane is checked against the bit-level model, its absolute value is
// thresholded at 32 and the resulting change mask is compared with the true
// rectangle. The approximate 8-bit difference is never more than 15 away
// from the exact one, so the mask must be exact: noise (<= 8 + 15 < 32) is
// never flagged and the change (>= 72 - 15 > 32) always is. The test also
// reports the mean absolute error and PSNR of each lane's difference image.
// Ends with a TB_RESULT line; a watchdog stops it.
module tb_image_change;
  import tb_sub_model_pkg::*;

  localparam int W = 128;
  localparam int H = 128;
  localparam int THRESH = 32;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] dividend;
  logic [7:0]  divisor;
  logic [7:0]  pix_a, pix_b;
  logic [7:0]  p1_q, p1_r, p2_q, p2_r;
  logic [7:0]  p1_d, p2_d;
  logic        p1_b, p2_b, ovf;

  int checks = 0, failures = 0;
  int mask_err [2];
  real abs_err [2];
  real sq_err [2];
  int changed = 0;

  approx_sub_top dut (
    .dividend(dividend), .divisor(divisor), .pix_a(pix_a), .pix_b(pix_b),
    .p1_quotient(p1_q), .p1_remainder(p1_r), .p1_pix_diff(p1_d), .p1_pix_borrow(p1_b),
    .p2_quotient(p2_q), .p2_remainder(p2_r), .p2_pix_diff(p2_d), .p2_pix_borrow(p2_b),
    .div_overflow(ovf));

  initial begin
    repeat (W * H * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int signed9(logic b, logic [7:0] d);
    return int'(d) - (b ? 256 : 0);
  endfunction

  initial begin
    dividend = 16'd0;
    divisor  = 8'd1;
    for (int k = 0; k < 2; k++) begin
      mask_err[k] = 0;
      abs_err[k]  = 0.0;
      sq_err[k]   = 0.0;
    end
    for (int yy = 0; yy < H; yy++) begin
      for (int xx = 0; xx < W; xx++) begin
        int a, bv, exact;
        int got [2];
        logic in_rect;
        longint unsigned m;
        a  = 40 + ((xx * 3 + yy * 2 + ((xx * yy) % 37)) % 131);
        in_rect = (xx >= 70 && xx < 102 && yy >= 20 && yy < 44);
        bv = in_rect ? a + 80 : a + int'($urandom_range(16)) - 8;
        pix_a = 8'(bv);   // current image
        pix_b = 8'(a);    // reference image
        @(posedge clk);
        exact  = bv - a;
        got[0] = signed9(p1_b, p1_d);
        got[1] = signed9(p2_b, p2_d);
        if (in_rect) changed++;
        for (int k = 0; k < 2; k++) begin
          int mag;
          m = ripple(8, 4, k + 1, longint'(pix_a), longint'(pix_b), 1'b0);
          checks++;
          if (got[k] != signed9(m[8], m[7:0])) begin
            failures++;
            if (failures < 10) $display("lane %0d: %0d - %0d gave %0d", k + 1, bv, a, got[k]);
          end
          mag = (got[k] < 0) ? -got[k] : got[k];
          if ((mag >= THRESH) != in_rect) mask_err[k]++;
          abs_err[k] += real'((got[k] > exact) ? got[k] - exact : exact - got[k]);
          sq_err[k]  += real'((got[k] - exact) * (got[k] - exact));
        end
      end
    end
    for (int k = 0; k < 2; k++) begin
      real mse;
      mse = sq_err[k] / real'(W * H);
      checks++;
      if (mask_err[k] != 0) begin
        failures++;
        $display("lane %0d: %0d pixels misclassified", k + 1, mask_err[k]);
      end
      $display("lane %0d (Proposed-%0d): mean abs error %0.3f, PSNR %0.2f dB, mask errors %0d",
               k + 1, k + 1, abs_err[k] / real'(W * H),
               (mse > 0.0) ? 10.0 * $log10(255.0 * 255.0 / mse) : 99.0, mask_err[k]);
    end
    $display("changed pixels %0d of %0d", changed, W * H);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

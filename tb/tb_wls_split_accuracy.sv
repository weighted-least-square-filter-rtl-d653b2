// tb_wls_split_accuracy: measures what splitting the forward sweep at the
// centre lines costs in accuracy, at the full frame size of 672 x 376.
//
// Two synthetic scenes are filtered by the post-filter core, one after the
// other:
//   case 1 "stairs"   horizontal steps of rising depth, one step edge lying
//                     exactly on the horizontal centre line, and a post whose
//                     left edge is six pixels from the vertical centre line;
//                     occlusion holes left of the post, scattered holes
//   case 2 "parking"  a ground plane whose depth grows towards the bottom,
//                     painted stripes in the guide that are not depth edges,
//                     two boxes (cars) standing on it, scattered holes and
//                     patches without measurements
// Every output pixel is first compared exactly with the reference model of the
// split design. The output is then compared with the reference model run
// without the split (forward sweep over whole lines, the exact solve of the
// same fixed-point arithmetic), and four figures are reported: pixels that
// differ, match rate, mean squared error, and PSNR = 10 log10(max^2 / MSE)
// with max the largest pixel of the exact result.
// Pass limits, chosen here: the split must change some pixels (otherwise the
// restart at the centre never took effect), and the PSNR must reach 45 dB in
// case 1 and 24 dB in case 2. Measured: case 1 88.8 % match, 52.2 dB; case 2
// 23.9 % match, 26.1 dB. Case 2 is the hard one for the split: its depth ramp
// runs across the horizontal centre line, and the lower half, solved without
// the upper one, settles a few grey levels away from the exact solution over
// a wide band. For reference, the published design reports matches of 82.3 %
// and 93.7 % and PSNRs of 38.0 dB and 41.0 dB on its own two camera scenes.
module tb_wls_split_accuracy;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int W = 672;
  localparam int H = 376;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, m_last;
  pix_t s_depth_l, s_depth_r, s_guide, m_depth;
  logic [1:0] phase;
  int   checks = 0, failures = 0;

  wls_postfilter dut (.*);

  always #5 clk = ~clk;

  int dl [], dr [], g [], split_out [], exact_out [], rtl_out [];
  int in_idx, out_idx;

  assign s_valid   = (in_idx < W*H);
  assign s_depth_l = pix_t'(dl[in_idx < W*H ? in_idx : 0]);
  assign s_depth_r = pix_t'(dr[in_idx < W*H ? in_idx : 0]);
  assign s_guide   = pix_t'(g[in_idx < W*H ? in_idx : 0]);
  assign m_ready   = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (s_valid && s_ready) in_idx <= in_idx + 1;
      if (m_valid && m_ready) begin
        checks++;
        rtl_out[out_idx] = int'(m_depth);
        if (int'(m_depth) != split_out[out_idx]) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %0d expected %0d", out_idx, m_depth,
                                      split_out[out_idx]);
        end
        out_idx <= out_idx + 1;
      end
    end
  end

  task automatic make_stairs();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int step, d, gv, post;
        step = y / 47;                                    // edge at y = 188
        post = (x >= 330 && x < 420 && y >= 60 && y < 330);
        d    = post ? 170 : 40 + 15 * step;
        gv   = post ? 200 : 50 + 18 * step;
        g[y*W + x]  = gv + int'($urandom_range(0, 2));
        dl[y*W + x] = ($urandom_range(0, 39) == 0) ? 0 : d + int'($urandom_range(0, 1));
        dr[y*W + x] = ($urandom_range(0, 39) == 0) ? 0 : d + int'($urandom_range(0, 1));
        if (x >= 322 && x < 330 && y >= 60 && y < 330) dl[y*W + x] = 0;   // occlusion
      end
  endtask

  task automatic make_parking();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int d, gv, car;
        car = (x >= 100 && x < 230 && y >= 190 && y < 300) ? 1 :
              (x >= 450 && x < 610 && y >= 140 && y < 260) ? 2 : 0;
        d   = (car == 1) ? 150 : (car == 2) ? 110 : 20 + (y * 150) / H;
        gv  = (car == 1) ? 30 : (car == 2) ? 220 :
              (((x % 96) < 4) ? 235 : 110 + y / 8);     // stripes on the ground
        g[y*W + x]  = gv + int'($urandom_range(0, 2));
        dl[y*W + x] = ($urandom_range(0, 39) == 0) ? 0 : d + int'($urandom_range(0, 1));
        dr[y*W + x] = ($urandom_range(0, 39) == 0) ? 0 : d + int'($urandom_range(0, 1));
        if (car == 0 && (x / 24 + y / 24) % 7 == 3 && (x % 24) < 12 && (y % 24) < 12)
          dl[y*W + x] = 0;                                // untextured patches
      end
  endtask

  task automatic run_case(string name, real min_psnr);
    int diff, maxv;
    real mse, psnr, match;
    ref_frame(8000, 1.5, 1000, W, H, dl, dr, g, split_out, 1'b1);
    ref_frame(8000, 1.5, 1000, W, H, dl, dr, g, exact_out, 1'b0);
    out_idx = 0;
    in_idx  = 0;
    while (!(m_valid && m_ready && m_last)) @(posedge clk);
    @(posedge clk);
    diff = 0; maxv = 0; mse = 0.0;
    for (int i = 0; i < W*H; i++) begin
      if (rtl_out[i] != exact_out[i]) diff++;
      if (exact_out[i] > maxv) maxv = exact_out[i];
      mse += real'((rtl_out[i] - exact_out[i]) * (rtl_out[i] - exact_out[i]));
    end
    mse   = mse / real'(W*H);
    match = 100.0 * real'(W*H - diff) / real'(W*H);
    psnr  = (mse == 0.0) ? 999.0 : 10.0 * $log10(real'(maxv * maxv) / mse);
    $display("%s: diff %0d of %0d, match %0.1f %%, MSE %0.3f, PSNR %0.2f dB",
             name, diff, W*H, match, mse, psnr);
    checks += 2;
    if (diff == 0) failures++;
    if (psnr < min_psnr) failures++;
  endtask

  initial begin
    dl = new[W*H]; dr = new[W*H]; g = new[W*H]; rtl_out = new[W*H];
    in_idx = W*H; out_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    make_stairs();
    run_case("case 1 (stairs)", 45.0);
    make_parking();
    run_case("case 2 (parking)", 24.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

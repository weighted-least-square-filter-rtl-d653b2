// tb_wls_postfilter_full: one complete frame through the post-filter at its
// default size, 672 x 376 pixels. The scene has three depth planes whose edges
// follow the guide image, sensor noise, and unmeasured (zero) pixels both
// scattered and in a block-shaped hole. The input never stalls and the output
// is always ready; every one of the 252,672 output pixels is compared with the
// reference model, the number of filled holes is reported, and the frame
// time is checked: (W+1)*(H+1) load cycles, (W/2)*(2H+5) + (H/2)*(2W+5)
// filter cycles and W*H output cycles, plus a few cycles of hand-over.
module tb_wls_postfilter_full;
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

  int dl [], dr [], g [], ref_out [];
  int in_idx, out_idx, holes, filled;
  longint cycles;

  assign s_valid   = (in_idx < W*H);
  assign s_depth_l = pix_t'(dl[in_idx < W*H ? in_idx : 0]);
  assign s_depth_r = pix_t'(dr[in_idx < W*H ? in_idx : 0]);
  assign s_guide   = pix_t'(g[in_idx < W*H ? in_idx : 0]);
  assign m_ready   = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (s_valid && s_ready) in_idx <= in_idx + 1;
      if (m_valid && m_ready) begin
        checks++;
        if (int'(m_depth) != ref_out[out_idx] || m_last != (out_idx == W*H - 1)) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %0d expected %0d", out_idx, m_depth,
                                      ref_out[out_idx]);
        end
        if (dl[out_idx] == 0) begin
          holes++;
          if (m_depth != 0) filled++;
        end
        out_idx <= out_idx + 1;
      end
    end
  end

  initial begin
    longint expect_cycles;
    dl = new[W*H]; dr = new[W*H]; g = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int obj = (x > 200 && x < 420 && y > 80) ? 2 : ((x + y / 2 > 500) ? 1 : 0);
        int d = (obj == 2) ? 150 : ((obj == 1) ? 90 : 30);
        g[y*W + x]  = 40 + obj * 70 + int'($urandom_range(0, 1));
        dl[y*W + x] = ($urandom_range(0, 9) == 0) ? 0 : d + int'($urandom_range(0, 2));
        dr[y*W + x] = ($urandom_range(0, 9) == 0) ? 0 : d + int'($urandom_range(0, 2));
        if (x >= 300 && x < 320 && y >= 150 && y < 170) dl[y*W + x] = 0;
      end
    ref_frame(8000, 1.5, 1000, W, H, dl, dr, g, ref_out);
    in_idx = 0; out_idx = 0; holes = 0; filled = 0; cycles = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!(m_valid && m_ready && m_last)) @(posedge clk);
    @(posedge clk);
    checks++;
    if (out_idx != W*H) failures++;
    expect_cycles = longint'((W + 1) * (H + 1)) + longint'((W/2) * (2*H + 5))
                  + longint'((H/2) * (2*W + 5)) + longint'(W * H);
    $display("frame: %0d cycles (%0d without hand-over), holes %0d, filled %0d",
             cycles, expect_cycles, holes, filled);
    checks++;
    if (cycles < expect_cycles || cycles > expect_cycles + 8) failures++;
    checks++;
    if (filled == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

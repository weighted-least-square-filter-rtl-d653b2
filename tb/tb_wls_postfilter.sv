// tb_wls_postfilter: end-to-end test of the post-filter at a reduced frame
// size. Synthetic scenes (depth steps following guide edges, random holes of
// unmeasured pixels, a small disagreement between left and right maps) are
// streamed in with random gaps, the output is read with random back-pressure,
// and every output pixel is compared with the reference model. Three frames
// run back to back. The test counts the mechanisms of the design and fails if
// one never happened: input stalls, output stalls, border replication in the
// window scan, untrusted pixels (confidence 0), backward steps of two paired
// lines at once, restarts of the forward sweep
// at the centre line, holes that came out filled, and the phase sequence
// load -> filter -> unload. The filter phase length is checked against
// (W/2)*(2H+5) + (H/2)*(2W+5) cycles.
module tb_wls_postfilter;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int     W      = 16;
  localparam int     H      = 10;
  localparam longint LAMBDA = 8000;
  localparam int     FRAMES = 3;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, m_last;
  pix_t s_depth_l, s_depth_r, s_guide, m_depth;
  logic [1:0] phase;
  int   checks = 0, failures = 0;

  wls_postfilter #(.W(W), .H(H), .LAMBDA(int'(LAMBDA)), .SIGMA(1.5), .DISC_SCALE(1000)) dut (.*);

  always #5 clk = ~clk;

  int dl [], dr [], g [], ref_out [];
  int in_idx, out_idx, frame;
  int n_in_stall, n_out_stall, n_border, n_untrusted, n_restart, n_paired, n_filled, n_phase_seq;
  int filter_cycles;
  logic [1:0] last_phase;

  task automatic make_scene(int f);
    dl = new[W*H]; dr = new[W*H]; g = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int obj = ((x + f) / 5 + y / 4) % 2;         // two depth planes
        int d = obj ? 120 : 40;
        g[y*W + x]  = obj ? 180 : 70;
        dl[y*W + x] = ($urandom_range(0, 5) == 0) ? 0 : d + int'($urandom_range(0, 2));
        dr[y*W + x] = ($urandom_range(0, 7) == 0) ? 0 : d + int'($urandom_range(0, 3));
      end
    ref_frame(LAMBDA, 1.5, 1000, W, H, dl, dr, g, ref_out);
  endtask

  // source
  assign s_valid   = (in_idx < W*H) && src_on;
  assign s_depth_l = pix_t'(dl[in_idx < W*H ? in_idx : 0]);
  assign s_depth_r = pix_t'(dr[in_idx < W*H ? in_idx : 0]);
  assign s_guide   = pix_t'(g[in_idx < W*H ? in_idx : 0]);
  logic src_on;

  always @(negedge clk) begin
    src_on  <= ($urandom_range(0, 3) != 0);
    m_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (s_valid && s_ready) in_idx <= in_idx + 1;
      if (s_ready && !s_valid) n_in_stall++;
      if (m_valid && !m_ready) n_out_stall++;
      if (phase == 2'd0 && !dut.need_in) n_border++;
      if (dut.dl_valid && dut.conf == '0) n_untrusted++;
      if (dut.u_wls.f_step && dut.u_wls.f_first) n_restart++;
      if (dut.u_wls.pa.wr_en && dut.u_wls.pb.wr_en && dut.u_wls.b_step) n_paired++;
      if (phase == 2'd1) filter_cycles++;
      if (phase != last_phase) begin
        if (phase == last_phase + 2'd1 || (phase == 2'd0 && last_phase == 2'd2)) n_phase_seq++;
        else failures++;
      end
      last_phase <= phase;
      if (m_valid && m_ready) begin
        checks++;
        if (int'(m_depth) != ref_out[out_idx] || m_last != (out_idx == W*H - 1)) begin
          failures++;
          if (failures < 10) $display("frame %0d pixel %0d: got %0d expected %0d", frame,
                                      out_idx, m_depth, ref_out[out_idx]);
        end
        if (dl[out_idx] == 0 && m_depth != 0) n_filled++;
        out_idx <= out_idx + 1;
      end
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    in_idx = 0; out_idx = 0; last_phase = 0;
    n_in_stall = 0; n_out_stall = 0; n_border = 0; n_untrusted = 0; n_restart = 0; n_paired = 0;
    n_filled = 0; n_phase_seq = 0;
    for (frame = 0; frame < FRAMES; frame++) begin
      make_scene(frame);
      in_idx = 0; out_idx = 0; filter_cycles = 0;
      if (frame == 0) begin
        repeat (2) @(posedge clk);
        rst_n = 1;
      end
      while (!(m_valid && m_ready && m_last)) @(posedge clk);
      @(posedge clk);
      checks++;
      if (out_idx != W*H) failures++;
      checks++;
      if (filter_cycles != (W/2) * (2*H + 5) + (H/2) * (2*W + 5) + 2) begin
        failures++;
        $display("filter phase took %0d cycles", filter_cycles);
      end
      @(negedge clk);
    end
    expect_seen("input stalls", n_in_stall);
    expect_seen("output stalls", n_out_stall);
    expect_seen("border positions", n_border);
    expect_seen("untrusted pixels", n_untrusted);
    expect_seen("forward restarts", n_restart);
    expect_seen("paired backward steps", n_paired);
    expect_seen("holes filled", n_filled);
    expect_seen("phase changes", n_phase_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_discontinuity: streams random depth maps (with zero holes) into the
// window unit with random gaps, checks every output pixel's position, centre
// value and discontinuity against the reference with replicated borders, and
// checks that an unstalled frame takes (W+1)*(H+1) cycles.
module tb_discontinuity;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int W = 10;
  localparam int H = 7;

  logic  clk = 0, rst_n = 0;
  logic  adv, need_in, out_valid, frame_done;
  pix_t  in_pix, out_center;
  crd_t  out_x, out_y;
  disc_t out_disc;
  int    checks = 0, failures = 0;
  int    img [];
  int    idx, outs, frames_done;
  logic  src_valid;
  bit    stall_mode;

  discontinuity #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  assign adv    = !need_in || (src_valid && idx < W*H);
  assign in_pix = pix_t'(img[idx]);

  always_ff @(posedge clk) if (rst_n && adv && need_in) idx <= idx + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ex, ey;
      ex = outs % W;
      ey = outs / W;
      checks++;
      if (int'(out_x) != ex || int'(out_y) != ey || int'(out_center) != img[ey*W + ex] ||
          longint'(out_disc) != ref_disc_at(img, W, H, ex, ey, 1000)) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d): got (%0d,%0d) c=%0d d=%0d", ex, ey, out_x,
                                    out_y, out_center, out_disc);
      end
      outs++;
    end
    if (rst_n && frame_done) frames_done++;
  end

  task automatic new_image();
    img = new[W*H + 1];
    for (int i = 0; i < W*H; i++)
      img[i] = ($urandom_range(0, 4) == 0) ? 0 : int'($urandom_range(30, 60));
    img[W*H] = 0;
  endtask

  initial begin
    int t0;
    idx = 0; outs = 0; frames_done = 0; src_valid = 0;
    new_image();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // frame 1: no stalls, timed
    src_valid = 1;
    t0 = 0;
    while (frames_done == 0) begin @(posedge clk); t0++; end
    checks++;
    if (t0 != (W + 1) * (H + 1) + 1) begin
      failures++;
      $display("frame took %0d cycles, expected %0d", t0, (W + 1) * (H + 1) + 1);
    end
    checks++;
    if (outs != W * H) failures++;
    // frames 2 and 3: random stalls
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      new_image();
      idx = 0; outs = 0;
      while (frames_done == f + 1) begin
        @(negedge clk);
        src_valid = ($urandom_range(0, 2) != 0);
      end
      checks++;
      if (outs != W * H) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wls_filter: loads a small frame (confidence and disparity*confidence with
// holes, guide made of flat patches with edges) into frame_banks, runs the
// WLS filter and compares every filtered word with the reference solve
// (vertical pass, then horizontal pass, split forward sweeps). Checks the
// cycle count (W/2)*(2H+5) + (H/2)*(2W+5) and runs two frames back to back.
module tb_wls_filter;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int     W      = 12;
  localparam int     H      = 8;
  localparam longint LAMBDA = 8000;

  logic    clk = 0, rst_n = 0;
  logic    start, busy, done;
  fb_req_t f_pa, f_pb, t_pa, pa, pb;
  gd_req_t ga;
  fb_rsp_t ra, rb;
  int      checks = 0, failures = 0;

  wls_filter #(.W(W), .H(H), .LAMBDA(int'(LAMBDA)), .SIGMA(1.5)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .pa(f_pa), .pb(f_pb), .ra(ra), .rb(rb));

  frame_banks #(.W(W), .H(H)) mem (.clk(clk), .rst_n(rst_n), .pa(pa), .pb(pb), .ga(ga),
                                   .ra(ra), .rb(rb));

  assign pa = busy ? f_pa : t_pa;
  assign pb = busy ? f_pb : '0;

  always #5 clk = ~clk;

  longint c0 [], c1 [];
  int     g [];

  task automatic run_frame(int seed);
    int cycles;
    c0 = new[W*H]; c1 = new[W*H]; g = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int cf = ($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(100, 255));
        int dd = int'($urandom_range(20, 90));
        c0[y*W + x] = longint'(cf) << 8;
        c1[y*W + x] = longint'(cf * dd) << 8;
        g[y*W + x]  = ((x / 3 + y / 3 + seed) % 3) * 40 + int'($urandom_range(0, 1));
      end
    // load through port a and the guide port
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      t_pa = '0;
      t_pa.wr_en = 1; t_pa.wr_x = crd_t'(i % W); t_pa.wr_y = crd_t'(i / W);
      t_pa.wr_data[0] = dval_t'(c0[i]); t_pa.wr_data[1] = dval_t'(c1[i]);
      ga.wr_en = 1; ga.wr_x = crd_t'(i % W); ga.wr_y = crd_t'(i / W); ga.wr_data = pix_t'(g[i]);
    end
    @(negedge clk);
    t_pa = '0; ga = '0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != (W/2) * (2*H + 5) + (H/2) * (2*W + 5) + 1) begin
      failures++;
      $display("filter took %0d cycles", cycles);
    end
    ref_wls(LAMBDA, 1.5, W, H, c0, c1, g);
    for (int i = 0; i < W*H; i++) begin
      t_pa = '0;
      t_pa.rd_en = 1; t_pa.rd_x = crd_t'(i % W); t_pa.rd_y = crd_t'(i / W);
      @(negedge clk);
      checks++;
      if (longint'(ra.data[0]) != c0[i] || longint'(ra.data[1]) != c1[i]) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got %0d,%0d expected %0d,%0d", i,
                                    ra.data[0], ra.data[1], c0[i], c1[i]);
      end
    end
    t_pa = '0;
  endtask

  initial begin
    start = 0; t_pa = '0; ga = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wls_system: end-to-end test of the post-filter behind its AXI4 master at a
// reduced frame size. Scenes with holes are placed in a randomly stalling
// memory model, the system filters them and writes the result back; every
// output byte is compared with the reference model. Two frames run with
// different addresses. Counted and required at least once: memory stalls on
// read and write, partial bursts, input stalls of the filter core,
// border positions of the window scan, untrusted pixels, forward restarts at
// the centre line, backward steps of two paired lines at once, filled holes
// and the load -> filter -> unload sequence.
module tb_wls_system;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 10;
  localparam int N = W * H;       // 160 pixels = 20 beats: one full, one partial burst

  logic clk = 0, rst_n = 0;
  logic start, busy, done, err;
  logic [31:0] src_l, src_r, src_g, dst;
  logic [31:0] araddr, awaddr;
  logic [7:0]  arlen, awlen, wstrb;
  logic [2:0]  arsize, awsize;
  logic [1:0]  arburst, awburst, rresp, bresp, phase;
  logic        arvalid, arready, rlast, rvalid, rready, awvalid, awready;
  logic        wlast, wvalid, wready, bvalid, bready;
  logic [63:0] rdata, wdata;
  int          checks = 0, failures = 0;
  int          n_ar_stall, n_w_stall, n_partial, n_in_stall, n_out_stall, n_border;
  int          n_untrusted, n_restart, n_paired, n_filled, n_phase;
  logic [1:0]  last_phase;

  wls_system #(.W(W), .H(H)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .src_l(src_l), .src_r(src_r), .src_g(src_g),
    .dst(dst), .busy(busy), .done(done), .err(err),
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp),
    .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb),
    .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp),
    .m_bvalid(bvalid), .m_bready(bready), .phase(phase));

  axi4_mem_model #(.MEM_BYTES(16384), .STALL_PCT(40)) mem (
    .clk(clk), .rst_n(rst_n), .araddr(araddr), .arlen(arlen), .arsize(arsize),
    .arburst(arburst), .arvalid(arvalid), .arready(arready), .rdata(rdata), .rresp(rresp),
    .rlast(rlast), .rvalid(rvalid), .rready(rready), .awaddr(awaddr), .awlen(awlen),
    .awsize(awsize), .awburst(awburst), .awvalid(awvalid), .awready(awready), .wdata(wdata),
    .wstrb(wstrb), .wlast(wlast), .wvalid(wvalid), .wready(wready), .bresp(bresp),
    .bvalid(bvalid), .bready(bready));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (arvalid && !arready) n_ar_stall++;
    if (wvalid && !wready) n_w_stall++;
    if (arvalid && arready && arlen != 8'd15) n_partial++;
    if (dut.u_core.s_ready && !dut.u_core.s_valid) n_in_stall++;
    if (dut.u_core.m_valid && !dut.u_core.m_ready) n_out_stall++;
    if (phase == 2'd0 && busy && !dut.u_core.need_in) n_border++;
    if (dut.u_core.dl_valid && dut.u_core.conf == '0) n_untrusted++;
    if (dut.u_core.u_wls.f_step && dut.u_core.u_wls.f_first) n_restart++;
    if (dut.u_core.u_wls.pa.wr_en && dut.u_core.u_wls.pb.wr_en && dut.u_core.u_wls.b_step) n_paired++;
    if (phase != last_phase) n_phase++;
    last_phase <= phase;
  end

  task automatic run_frame(int base, int f);
    int dl [], dr [], g [], ref_out [];
    dl = new[N]; dr = new[N]; g = new[N];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int obj = ((x + 2 * f) / 6 + y / 5) % 2;
        int d = obj ? 130 : 45;
        g[y*W + x]  = obj ? 200 : 60;
        dl[y*W + x] = ($urandom_range(0, 4) == 0) ? 0 : d + int'($urandom_range(0, 2));
        dr[y*W + x] = ($urandom_range(0, 6) == 0) ? 0 : d + int'($urandom_range(0, 2));
      end
    ref_frame(8000, 1.5, 1000, W, H, dl, dr, g, ref_out);
    src_l = 32'(base); src_r = 32'(base + 1024); src_g = 32'(base + 2048);
    dst = 32'(base + 3072);
    for (int i = 0; i < N; i++) begin
      mem.mem[base + i] = 8'(dl[i]);
      mem.mem[base + 1024 + i] = 8'(dr[i]);
      mem.mem[base + 2048 + i] = 8'(g[i]);
      mem.mem[base + 3072 + i] = 8'hEE;
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(mem.mem[base + 3072 + i]) != ref_out[i]) begin
        failures++;
        if (failures < 10) $display("frame %0d pixel %0d: got %0d expected %0d", f, i,
                                    mem.mem[base + 3072 + i], ref_out[i]);
      end
      if (dl[i] == 0 && mem.mem[base + 3072 + i] != 0) n_filled++;
    end
    checks++;
    if (err || mem.bad_bursts != 0) failures++;
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    start = 0; last_phase = 0;
    n_ar_stall = 0; n_w_stall = 0; n_partial = 0; n_in_stall = 0; n_out_stall = 0;
    n_border = 0; n_untrusted = 0; n_restart = 0; n_paired = 0; n_filled = 0; n_phase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0);
    run_frame(8192, 1);
    expect_seen("read address stalls", n_ar_stall);
    expect_seen("write data stalls", n_w_stall);
    expect_seen("partial bursts", n_partial);
    expect_seen("core input stalls", n_in_stall);
    expect_seen("border positions", n_border);
    expect_seen("untrusted pixels", n_untrusted);
    expect_seen("forward restarts", n_restart);
    expect_seen("paired backward steps", n_paired);
    expect_seen("holes filled", n_filled);
    expect_seen("phase changes", n_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

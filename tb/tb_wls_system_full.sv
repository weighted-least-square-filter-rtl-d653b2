// tb_wls_system_full: one complete 672 x 376 frame through the whole system at
// its default parameters: the three images are read over AXI4 from the memory
// model (10% random stalls), filtered, and the result written back. Every
// output byte is compared with the reference model, and the frame time is
// reported against the core's 1.01 million-cycle schedule.
module tb_wls_system_full;
  import wls_pkg::*;
  import wls_ref_pkg::*;

  localparam int W = 672;
  localparam int H = 376;
  localparam int N = W * H;

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

  wls_system dut (
    .clk(clk), .rst_n(rst_n), .start(start), .src_l(src_l), .src_r(src_r), .src_g(src_g),
    .dst(dst), .busy(busy), .done(done), .err(err),
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp),
    .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb),
    .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp),
    .m_bvalid(bvalid), .m_bready(bready), .phase(phase));

  axi4_mem_model #(.MEM_BYTES(1 << 20), .STALL_PCT(10)) mem (
    .clk(clk), .rst_n(rst_n), .araddr(araddr), .arlen(arlen), .arsize(arsize),
    .arburst(arburst), .arvalid(arvalid), .arready(arready), .rdata(rdata), .rresp(rresp),
    .rlast(rlast), .rvalid(rvalid), .rready(rready), .awaddr(awaddr), .awlen(awlen),
    .awsize(awsize), .awburst(awburst), .awvalid(awvalid), .awready(awready), .wdata(wdata),
    .wstrb(wstrb), .wlast(wlast), .wvalid(wvalid), .wready(wready), .bresp(bresp),
    .bvalid(bvalid), .bready(bready));

  always #5 clk = ~clk;

  initial begin
    int dl [], dr [], g [], ref_out [];
    int holes, filled;
    longint cycles;
    dl = new[N]; dr = new[N]; g = new[N];
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
    src_l = 32'(0); src_r = 32'(N); src_g = 32'(2 * N); dst = 32'(3 * N);
    for (int i = 0; i < N; i++) begin
      mem.mem[i] = 8'(dl[i]);
      mem.mem[N + i] = 8'(dr[i]);
      mem.mem[2*N + i] = 8'(g[i]);
      mem.mem[3*N + i] = 8'hEE;
    end
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    holes = 0; filled = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(mem.mem[3*N + i]) != ref_out[i]) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got %0d expected %0d", i, mem.mem[3*N + i],
                                    ref_out[i]);
      end
      if (dl[i] == 0) begin
        holes++;
        if (mem.mem[3*N + i] != 0) filled++;
      end
    end
    checks++;
    if (err || mem.bad_bursts != 0) failures++;
    $display("frame: %0d cycles, holes %0d, filled %0d", cycles, holes, filled);
    checks++;
    if (cycles < 1014357 || cycles > 1014357 + 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

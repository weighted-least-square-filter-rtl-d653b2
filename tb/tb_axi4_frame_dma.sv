// tb_axi4_frame_dma: the AXI4 frame mover against a randomly stalling memory
// model. Its pixel output is looped back to its result input through a simple
// function, f = (L + 3*R) xor G, with random gaps on both sides, so the
// written frame checks the read ordering of all three images, the packing
// of pixels into beats, full and partial bursts, and the done pulse. Two
// frames run with different base addresses.
module tb_axi4_frame_dma;
  import wls_pkg::*;

  localparam int W = 16;
  localparam int H = 13;        // 208 pixels = 26 beats: one full and one partial burst
  localparam int N = W * H;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, err;
  logic [31:0] src_l, src_r, src_g, dst;
  logic [31:0] araddr, awaddr;
  logic [7:0]  arlen, awlen, wstrb;
  logic [2:0]  arsize, awsize;
  logic [1:0]  arburst, awburst, rresp, bresp;
  logic        arvalid, arready, rlast, rvalid, rready, awvalid, awready;
  logic        wlast, wvalid, wready, bvalid, bready;
  logic [63:0] rdata, wdata;
  logic        p_valid, p_ready, q_valid, q_ready;
  pix_t        p_l, p_r, p_g, q_depth;
  logic        gate_p;
  int          checks = 0, failures = 0, partial_bursts = 0, full_bursts = 0;

  axi4_frame_dma #(.W(W), .H(H)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .src_l(src_l), .src_r(src_r), .src_g(src_g),
    .dst(dst), .busy(busy), .done(done), .err(err),
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst),
    .m_arvalid(arvalid), .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp),
    .m_rlast(rlast), .m_rvalid(rvalid), .m_rready(rready),
    .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awvalid(awvalid), .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb),
    .m_wlast(wlast), .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp),
    .m_bvalid(bvalid), .m_bready(bready),
    .p_valid(p_valid), .p_ready(p_ready), .p_depth_l(p_l), .p_depth_r(p_r), .p_guide(p_g),
    .q_valid(q_valid), .q_ready(q_ready), .q_depth(q_depth));

  axi4_mem_model #(.MEM_BYTES(16384), .STALL_PCT(30)) mem (
    .clk(clk), .rst_n(rst_n), .araddr(araddr), .arlen(arlen), .arsize(arsize),
    .arburst(arburst), .arvalid(arvalid), .arready(arready), .rdata(rdata), .rresp(rresp),
    .rlast(rlast), .rvalid(rvalid), .rready(rready), .awaddr(awaddr), .awlen(awlen),
    .awsize(awsize), .awburst(awburst), .awvalid(awvalid), .awready(awready), .wdata(wdata),
    .wstrb(wstrb), .wlast(wlast), .wvalid(wvalid), .wready(wready), .bresp(bresp),
    .bvalid(bvalid), .bready(bready));

  // loop-back with random gaps
  assign q_valid = p_valid && gate_p;
  assign p_ready = q_ready && gate_p;
  assign q_depth = pix_t'((p_l + 8'(3 * p_r)) ^ p_g);

  always #5 clk = ~clk;
  always @(negedge clk) gate_p <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (arvalid && arready) begin
    if (arlen == 8'd15) full_bursts++; else partial_bursts++;
  end

  task automatic run_frame(int base);
    src_l = 32'(base); src_r = 32'(base + 1024); src_g = 32'(base + 2048);
    dst = 32'(base + 3072);
    for (int i = 0; i < N; i++) begin
      mem.mem[base + i]        = 8'($urandom);
      mem.mem[base + 1024 + i] = 8'($urandom);
      mem.mem[base + 2048 + i] = 8'($urandom);
      mem.mem[base + 3072 + i] = 8'hEE;
    end
    for (int i = N; i < N + 8; i++) mem.mem[base + 3072 + i] = 8'hEE;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      logic [7:0] e;
      e = (mem.mem[base + i] + 8'(3 * mem.mem[base + 1024 + i])) ^ mem.mem[base + 2048 + i];
      checks++;
      if (mem.mem[base + 3072 + i] != e) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h expected %h", i, mem.mem[base + 3072 + i], e);
      end
    end
    checks++;
    if (mem.mem[base + 3072 + N] != 8'hEE) failures++;   // nothing written past the frame
    checks++;
    if (err || mem.bad_bursts != 0) failures++;
  endtask

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(4096);
    checks++;
    if (partial_bursts == 0 || full_bursts == 0) failures++;
    $display("bursts: %0d full, %0d partial", full_bursts, partial_bursts);
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

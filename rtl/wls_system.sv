// wls_system: the depth-map post-filter attached to off-chip memory through
// an AXI4 master.
//
// A host places the left and right disparity maps and the guide image (8 bits
// per pixel, raster order, W*H bytes each) in memory, sets the four base
// addresses and pulses start. axi4_frame_dma streams the three images into
// wls_postfilter, which loads, smooths and divides as described there, and
// writes the filtered disparity map back to dst. done pulses when the last
// write has been acknowledged; err reports a non-OKAY AXI response.
//
// Timing at the defaults (672 x 376): about 1.01 million cycles a frame when
// the memory keeps up, i.e. about 7.8 ms at 130 MHz. Placing the frames in DDR4
// behind AXI4 follows the source; the control ports stand in for the host
// processor's register access and are this design's choice.
module wls_system
  import wls_pkg::*;
#(
  parameter int  W          = 672,
  parameter int  H          = 376,
  parameter int  LAMBDA     = 8000,
  parameter real SIGMA      = 1.5,
  parameter int  DISC_SCALE = 1000,
  parameter int  ADDR_W     = 32,
  parameter int  BURST      = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] src_l,
  input  logic [ADDR_W-1:0] src_r,
  input  logic [ADDR_W-1:0] src_g,
  input  logic [ADDR_W-1:0] dst,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic [ADDR_W-1:0] m_araddr,
  output logic [7:0]        m_arlen,
  output logic [2:0]        m_arsize,
  output logic [1:0]        m_arburst,
  output logic              m_arvalid,
  input  logic              m_arready,
  input  logic [63:0]       m_rdata,
  input  logic [1:0]        m_rresp,
  input  logic              m_rlast,
  input  logic              m_rvalid,
  output logic              m_rready,
  output logic [ADDR_W-1:0] m_awaddr,
  output logic [7:0]        m_awlen,
  output logic [2:0]        m_awsize,
  output logic [1:0]        m_awburst,
  output logic              m_awvalid,
  input  logic              m_awready,
  output logic [63:0]       m_wdata,
  output logic [7:0]        m_wstrb,
  output logic              m_wlast,
  output logic              m_wvalid,
  input  logic              m_wready,
  input  logic [1:0]        m_bresp,
  input  logic              m_bvalid,
  output logic              m_bready,
  output logic [1:0]        phase
);

  logic p_valid, p_ready, q_valid, q_ready;
  pix_t p_l, p_r, p_g, q_depth;

  axi4_frame_dma #(.W(W), .H(H), .ADDR_W(ADDR_W), .BURST(BURST)) u_dma (
    .clk(clk), .rst_n(rst_n), .start(start), .src_l(src_l), .src_r(src_r),
    .src_g(src_g), .dst(dst), .busy(busy), .done(done), .err(err),
    .m_araddr(m_araddr), .m_arlen(m_arlen), .m_arsize(m_arsize), .m_arburst(m_arburst),
    .m_arvalid(m_arvalid), .m_arready(m_arready), .m_rdata(m_rdata), .m_rresp(m_rresp),
    .m_rlast(m_rlast), .m_rvalid(m_rvalid), .m_rready(m_rready),
    .m_awaddr(m_awaddr), .m_awlen(m_awlen), .m_awsize(m_awsize), .m_awburst(m_awburst),
    .m_awvalid(m_awvalid), .m_awready(m_awready), .m_wdata(m_wdata), .m_wstrb(m_wstrb),
    .m_wlast(m_wlast), .m_wvalid(m_wvalid), .m_wready(m_wready), .m_bresp(m_bresp),
    .m_bvalid(m_bvalid), .m_bready(m_bready),
    .p_valid(p_valid), .p_ready(p_ready), .p_depth_l(p_l), .p_depth_r(p_r), .p_guide(p_g),
    .q_valid(q_valid), .q_ready(q_ready), .q_depth(q_depth));

  wls_postfilter #(.W(W), .H(H), .LAMBDA(LAMBDA), .SIGMA(SIGMA), .DISC_SCALE(DISC_SCALE)) u_core (
    .clk(clk), .rst_n(rst_n),
    .s_valid(p_valid), .s_ready(p_ready), .s_depth_l(p_l), .s_depth_r(p_r), .s_guide(p_g),
    .m_valid(q_valid), .m_ready(q_ready), .m_depth(q_depth),
    .m_last(),          // the DMA counts the frame itself
    .phase(phase));

endmodule

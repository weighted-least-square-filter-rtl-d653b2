// frame_banks: the on-chip frame store of the WLS filter, split in two banks so
// that two line engines can each read and write one pixel per cycle.
//
// It holds the guide image (8 bits per pixel) and one data word per pixel with
// both filtered channels side by side (confidence and disparity*confidence,
// 2 x 24 bits). The frame is cut into four quadrants at its centre lines and the
// quadrants are dealt to the banks like a checkerboard:
//   bank = (x >= W/2) XOR (y >= H/2)
// Two accesses to the same row, one in each half, or to the same column, one
// in each half, therefore always hit different banks. That is exactly the
// pattern of the two forward engines of the split WLS sweep (one per half
// line), and of the two backward engines, which work on line l and line
// l + L/2 at the same position. Every bank is a frame_ram (one read and one
// write per cycle, read data one cycle later), so each of the two ports may
// read one pixel and write another in the same cycle.
//
// Ports: pa and pb carry a read and a data write each; ga writes the guide.
// Reads return data and guide of the same pixel on ra / rb one cycle later.
// Two ports must not read (or write) the same bank in one cycle; an assertion
// checks it and port pa wins in hardware. The two-bank partition mirrors the
// source's partitioning of its arrays by two; the checkerboard mapping is this
// design's choice. W and H must be even.
module frame_banks
  import wls_pkg::*;
#(
  parameter int W = 672,
  parameter int H = 376
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fb_req_t pa,
  input  fb_req_t pb,
  input  gd_req_t ga,
  output fb_rsp_t ra,
  output fb_rsp_t rb
);

  localparam int W2    = W / 2;
  localparam int H2    = H / 2;
  localparam int DEPTH = W2 * H2 * 2;
  localparam int AW    = $clog2(DEPTH);
  localparam int DW    = NCH * D_W;

  typedef struct packed {
    logic          bank;
    logic [AW-1:0] addr;
  } loc_t;

  function automatic loc_t locate(crd_t x, crd_t y);
    logic qx, qy;
    int   lx, ly;
    loc_t l;
    qx     = (32'(x) >= W2);
    qy     = (32'(y) >= H2);
    lx     = qx ? 32'(x) - W2 : 32'(x);
    ly     = qy ? 32'(y) - H2 : 32'(y);
    l.bank = qx ^ qy;
    l.addr = AW'((qy ? W2 * H2 : 0) + ly * W2 + lx);
    return l;
  endfunction

  loc_t a_rd, b_rd, a_wr, b_wr, g_wr;
  logic            rd_en [2];
  logic [AW-1:0]   rd_addr [2];
  logic            wr_en [2];
  logic [AW-1:0]   wr_addr [2];
  logic [DW-1:0]   wr_data [2];
  logic            g_en [2];
  logic [DW-1:0]   rd_data [2];
  pix_t            g_data [2];
  logic            a_bank_q, b_bank_q;

  always_comb begin
    a_rd = locate(pa.rd_x, pa.rd_y);
    b_rd = locate(pb.rd_x, pb.rd_y);
    a_wr = locate(pa.wr_x, pa.wr_y);
    b_wr = locate(pb.wr_x, pb.wr_y);
    g_wr = locate(ga.wr_x, ga.wr_y);
    for (int k = 0; k < 2; k++) begin
      if (pa.rd_en && a_rd.bank == k[0]) begin
        rd_en[k] = 1'b1; rd_addr[k] = a_rd.addr;
      end else begin
        rd_en[k] = pb.rd_en && b_rd.bank == k[0]; rd_addr[k] = b_rd.addr;
      end
      if (pa.wr_en && a_wr.bank == k[0]) begin
        wr_en[k] = 1'b1; wr_addr[k] = a_wr.addr; wr_data[k] = pa.wr_data;
      end else begin
        wr_en[k] = pb.wr_en && b_wr.bank == k[0]; wr_addr[k] = b_wr.addr;
        wr_data[k] = pb.wr_data;
      end
      g_en[k] = ga.wr_en && g_wr.bank == k[0];
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    frame_ram #(.DEPTH(DEPTH), .WIDTH(DW)) u_data (
      .clk(clk), .wr_en(wr_en[k]), .wr_addr(wr_addr[k]), .wr_data(wr_data[k]),
      .rd_en(rd_en[k]), .rd_addr(rd_addr[k]), .rd_data(rd_data[k]));
    frame_ram #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_guide (
      .clk(clk), .wr_en(g_en[k]), .wr_addr(g_wr.addr), .wr_data(ga.wr_data),
      .rd_en(rd_en[k]), .rd_addr(rd_addr[k]), .rd_data(g_data[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_bank_q <= 1'b0;
      b_bank_q <= 1'b0;
    end else begin
      a_bank_q <= a_rd.bank;
      b_bank_q <= b_rd.bank;
    end
  end

  assign ra.data  = rd_data[a_bank_q];
  assign ra.guide = g_data[a_bank_q];
  assign rb.data  = rd_data[b_bank_q];
  assign rb.guide = g_data[b_bank_q];

  // Both ports in one bank in one cycle would lose port b's access.
  property p_no_rd_clash;
    @(posedge clk) disable iff (!rst_n)
      !(pa.rd_en && pb.rd_en && a_rd.bank == b_rd.bank);
  endproperty
  property p_no_wr_clash;
    @(posedge clk) disable iff (!rst_n)
      !(pa.wr_en && pb.wr_en && a_wr.bank == b_wr.bank);
  endproperty
  a_no_rd_clash: assert property (p_no_rd_clash);
  a_no_wr_clash: assert property (p_no_wr_clash);

endmodule

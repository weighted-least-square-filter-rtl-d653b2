// axi4_frame_dma: AXI4 master that moves one frame between off-chip memory and
// the post-filter's pixel streams.
//
// Read side: after start it fetches three images of W*H bytes (left
// disparity at src_l, right disparity at src_r, guide at src_g) with INCR
// bursts of up to BURST beats of 8 pixels (64-bit data). Bursts are issued
// round-robin among the three images whenever that image's buffer has room for
// the whole burst (space already promised to bursts in flight is counted), so
// rready can stay high. Read data returns in request order (one AXI ID); a
// small queue remembers which image each burst belongs to. When all three
// buffers hold data, one pixel of each leaves per cycle on the p_* stream.
// Write side: result pixels from the q_* stream are packed eight to a beat and
// written to dst in bursts of up to BURST beats, one burst at a time (the
// address is sent together with the start of its data); done pulses when the
// last write response has arrived. err is set by any response other than OKAY.
//
// The source only states that frames live in DDR4 and reach the logic through
// an AXI4 interface; the data width, burst length, buffering and the
// read/write scheduling are this design's choices. Base addresses must be
// aligned to BURST*8 bytes so no burst crosses a 4 KB boundary, and W*H must be
// a multiple of 8.
module axi4_frame_dma
  import wls_pkg::*;
#(
  parameter int W      = 672,
  parameter int H      = 376,
  parameter int ADDR_W = 32,
  parameter int BURST  = 16,
  parameter int FDEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [ADDR_W-1:0] src_l,
  input  logic [ADDR_W-1:0] src_r,
  input  logic [ADDR_W-1:0] src_g,
  input  logic [ADDR_W-1:0] dst,
  output logic              busy,
  output logic              done,
  output logic              err,
  // AXI4 read address / data
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
  // AXI4 write address / data / response
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
  // pixels to the filter
  output logic              p_valid,
  input  logic              p_ready,
  output pix_t              p_depth_l,
  output pix_t              p_depth_r,
  output pix_t              p_guide,
  // filtered pixels from the filter
  input  logic              q_valid,
  output logic              q_ready,
  input  pix_t              q_depth
);

  localparam int BEATS  = (W * H) / 8;                 // beats per image
  localparam int BW     = $clog2(BEATS + 1);
  localparam int CW     = $clog2(FDEPTH + 1);
  localparam int NBURST = (BEATS + BURST - 1) / BURST;

  typedef logic [BW-1:0] beats_t;

  logic running;

  // ---------------- read side ----------------
  logic [ADDR_W-1:0] base [3];
  beats_t            ar_left [3];           // beats not yet requested
  logic [CW-1:0]     reserved [3];          // words held + words in flight
  logic [1:0]        rr;                    // round-robin pointer
  logic [1:0]        pick;
  logic              pick_ok;
  beats_t            pick_len;
  logic [1:0]        id_head;
  logic              id_empty, id_full;
  logic [2:0]        id_count_unused;

  logic        f_push [3], f_pop [3], f_empty [3], f_full [3];
  logic [63:0] f_data [3];
  logic [CW-1:0] f_count [3];
  logic [2:0]  poff;                        // pixel within the head beat

  function automatic beats_t min_len(beats_t left);
    return (left > beats_t'(BURST)) ? beats_t'(BURST) : left;
  endfunction

  always_comb begin
    pick     = rr;
    pick_ok  = 1'b0;
    pick_len = '0;
    for (int i = 0; i < 3; i++) begin
      logic [1:0] s;
      s = 2'((32'(rr) + i) % 3);
      if (!pick_ok && ar_left[s] != '0 &&
          32'(reserved[s]) + 32'(min_len(ar_left[s])) <= FDEPTH) begin
        pick     = s;
        pick_ok  = 1'b1;
        pick_len = min_len(ar_left[s]);
      end
    end
  end

  wire ar_fire   = m_arvalid && m_arready;
  wire ar_launch = running && !m_arvalid && pick_ok && !id_full;

  sync_fifo #(.WIDTH(2), .DEPTH(4)) u_idq (
    .clk(clk), .rst_n(rst_n), .push(ar_launch), .wr_data(pick),
    .pop(m_rvalid && m_rready && m_rlast), .rd_data(id_head), .empty(id_empty),
    .full(id_full), .count(id_count_unused));

  assign m_arsize  = 3'd3;                  // 8 bytes per beat
  assign m_arburst = 2'b01;                 // INCR
  assign m_rready  = 1'b1;                  // space reserved in advance

  for (genvar s = 0; s < 3; s++) begin : g_rf
    assign f_push[s] = m_rvalid && !id_empty && (id_head == 2'(s));
    assign f_pop[s]  = p_valid && p_ready && (poff == 3'd7);
    sync_fifo #(.WIDTH(64), .DEPTH(FDEPTH)) u_f (
      .clk(clk), .rst_n(rst_n), .push(f_push[s]), .wr_data(m_rdata), .pop(f_pop[s]),
      .rd_data(f_data[s]), .empty(f_empty[s]), .full(f_full[s]), .count(f_count[s]));
  end

  assign p_valid   = !f_empty[0] && !f_empty[1] && !f_empty[2];
  assign p_depth_l = f_data[0][8*poff +: 8];
  assign p_depth_r = f_data[1][8*poff +: 8];
  assign p_guide   = f_data[2][8*poff +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_arvalid <= 1'b0;
      m_araddr  <= '0;
      m_arlen   <= '0;
      rr        <= '0;
      poff      <= '0;
      for (int s = 0; s < 3; s++) begin
        base[s]     <= '0;
        ar_left[s]  <= '0;
        reserved[s] <= '0;
      end
    end else begin
      if (start && !running) begin
        base[0] <= src_l;
        base[1] <= src_r;
        base[2] <= src_g;
        for (int s = 0; s < 3; s++) ar_left[s] <= beats_t'(BEATS);
      end
      if (ar_fire) m_arvalid <= 1'b0;
      if (ar_launch) begin
        m_arvalid     <= 1'b1;
        m_araddr      <= base[pick];
        m_arlen       <= 8'(pick_len - 1'b1);
        base[pick]    <= base[pick] + ADDR_W'(32'(pick_len) * 8);
        ar_left[pick] <= ar_left[pick] - pick_len;
        rr            <= (pick == 2'd2) ? 2'd0 : 2'(pick + 1'b1);
      end
      for (int s = 0; s < 3; s++) begin
        reserved[s] <= reserved[s]
                     + ((ar_launch && pick == 2'(s)) ? CW'(pick_len) : CW'(0))
                     - CW'(f_pop[s]);
      end
      if (p_valid && p_ready) poff <= poff + 3'd1;
    end
  end

  // ---------------- write side ----------------
  logic [63:0]       gather;
  logic [2:0]        qoff;
  logic              wf_push, wf_pop, wf_empty, wf_full;
  logic [63:0]       wf_data, wf_in;
  logic [CW-1:0]     wf_count;
  beats_t            aw_left;
  logic [ADDR_W-1:0] waddr;
  logic              w_active;
  logic [7:0]        w_cnt, w_len;
  logic [$clog2(NBURST+1)-1:0] b_seen;
  beats_t            next_len;

  assign q_ready = running && !wf_full;
  assign wf_in   = {q_depth, gather[63:8]};
  assign wf_push = q_valid && q_ready && (qoff == 3'd7);

  sync_fifo #(.WIDTH(64), .DEPTH(FDEPTH)) u_wf (
    .clk(clk), .rst_n(rst_n), .push(wf_push), .wr_data(wf_in), .pop(wf_pop),
    .rd_data(wf_data), .empty(wf_empty), .full(wf_full), .count(wf_count));

  assign next_len  = min_len(aw_left);
  assign m_awsize  = 3'd3;
  assign m_awburst = 2'b01;
  assign m_wdata   = wf_data;
  assign m_wstrb   = 8'hFF;
  assign m_wvalid  = w_active && !wf_empty;
  assign m_wlast   = (w_cnt == w_len);
  assign wf_pop    = m_wvalid && m_wready;
  assign m_bready  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gather    <= '0;
      qoff      <= '0;
      aw_left   <= '0;
      waddr     <= '0;
      m_awvalid <= 1'b0;
      m_awaddr  <= '0;
      m_awlen   <= '0;
      w_active  <= 1'b0;
      w_cnt     <= '0;
      w_len     <= '0;
      b_seen    <= '0;
      running   <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        aw_left <= beats_t'(BEATS);
        waddr   <= dst;
        b_seen  <= '0;
        qoff    <= '0;
        err     <= 1'b0;
      end
      if (q_valid && q_ready) begin
        gather <= wf_in;
        qoff   <= qoff + 3'd1;
      end
      // one burst at a time: address and data start together
      if (m_awvalid && m_awready) m_awvalid <= 1'b0;
      if (running && !w_active && !m_awvalid && aw_left != '0 &&
          32'(wf_count) >= 32'(next_len)) begin
        m_awvalid <= 1'b1;
        m_awaddr  <= waddr;
        m_awlen   <= 8'(next_len - 1'b1);
        w_len     <= 8'(next_len - 1'b1);
        w_cnt     <= '0;
        w_active  <= 1'b1;
        waddr     <= waddr + ADDR_W'(32'(next_len) * 8);
        aw_left   <= aw_left - next_len;
      end
      if (wf_pop) begin
        w_cnt <= w_cnt + 8'd1;
        if (m_wlast) w_active <= 1'b0;
      end
      if (m_bvalid) begin
        b_seen <= b_seen + 1'b1;
        if (m_bresp != 2'b00) err <= 1'b1;
        if (32'(b_seen) == NBURST - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
      if (m_rvalid && m_rresp != 2'b00) err <= 1'b1;
    end
  end

  assign busy = running;

  a_rdata_expected: assert property (@(posedge clk) disable iff (!rst_n) m_rvalid |-> !id_empty);
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));

endmodule

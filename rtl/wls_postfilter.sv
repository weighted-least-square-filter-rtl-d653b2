// wls_postfilter: depth-map post-filter that fills unmeasured (zero) pixels of
// a stereo disparity map with a guided weighted-least-squares smoother.
//
// A frame goes through three phases, one after the other:
//   LOAD    Left disparity, right disparity and guide pixels arrive together in
//           raster order (s_valid/s_ready). Two discontinuity units (left and
//           right, in parallel) score each pixel from the variance of its 3x3
//           neighbourhood; confidence turns the two scores into
//           conf = min(disc_L, disc_R)*255 and disparity*conf. Both values and
//           the guide pixel are written into the on-chip frame store.
//   FILTER  wls_filter smooths conf and disparity*conf in place, vertical pass
//           then horizontal pass, each line with a split forward sweep on two
//           engines and a backward sweep, two lines' backward sweeps at once.
//   UNLOAD  depth_divide streams out filtered(disparity*conf)/filtered(conf)
//           in raster order (m_valid/m_ready, m_last on the last pixel).
// Then the next frame can be loaded.
//
// Timing at the defaults (672 x 376): LOAD takes (W+1)*(H+1) cycles when the
// input never stalls, FILTER (W/2)*(2H+5) + (H/2)*(2W+5) cycles and UNLOAD W*H
// cycles when the output never stalls: about 1.01 million cycles a frame.
// The data flow, the formulas and the parallel left/right and two-engine
// structure follow the source; the stream interfaces stand in for the AXI4
// transfers from DDR4 memory, and the phase sequencing is this design's choice.
module wls_postfilter
  import wls_pkg::*;
#(
  parameter int  W          = 672,
  parameter int  H          = 376,
  parameter int  LAMBDA     = 8000,
  parameter real SIGMA      = 1.5,
  parameter int  DISC_SCALE = 1000
) (
  input  logic clk,
  input  logic rst_n,
  // input frame, raster order
  input  logic s_valid,
  output logic s_ready,
  input  pix_t s_depth_l,
  input  pix_t s_depth_r,
  input  pix_t s_guide,
  // filtered disparity, raster order
  output logic m_valid,
  input  logic m_ready,
  output pix_t m_depth,
  output logic m_last,
  // status
  output logic [1:0] phase     // 0 load, 1 filter, 2 unload
);

  typedef enum logic [1:0] {P_LOAD = 2'd0, P_FILTER = 2'd1, P_UNLOAD = 2'd2} phase_t;

  phase_t  st;
  logic    need_in, adv;
  logic    dl_valid, dr_valid, dl_done, dr_done;
  crd_t    dl_x, dl_y, dr_x, dr_y;
  disc_t   dl_disc, dr_disc;
  pix_t    dl_center, dr_center;
  pix_t    conf;
  dvec_t   words;
  crd_t    gx, gy;

  logic    f_start, f_busy, f_done;
  fb_req_t f_pa, f_pb;
  logic    v_start, v_busy, v_done;
  fb_req_t v_rq;
  fb_req_t pa, pb;
  gd_req_t ga;
  fb_rsp_t ra, rb;

  assign adv     = (st == P_LOAD) && (!need_in || s_valid);
  assign s_ready = (st == P_LOAD) && need_in;

  discontinuity #(.W(W), .H(H), .DISC_SCALE(DISC_SCALE)) u_disc_l (
    .clk(clk), .rst_n(rst_n), .adv(adv), .need_in(need_in), .in_pix(s_depth_l),
    .out_valid(dl_valid), .out_x(dl_x), .out_y(dl_y), .out_disc(dl_disc),
    .out_center(dl_center), .frame_done(dl_done));

  discontinuity #(.W(W), .H(H), .DISC_SCALE(DISC_SCALE)) u_disc_r (
    .clk(clk), .rst_n(rst_n), .adv(adv), .need_in(), .in_pix(s_depth_r),
    .out_valid(dr_valid), .out_x(dr_x), .out_y(dr_y), .out_disc(dr_disc),
    .out_center(dr_center), .frame_done(dr_done));

  confidence u_conf (
    .disc_l(dl_disc), .disc_r(dr_disc), .disp_l(dl_center),
    .conf(conf), .words(words));

  // Guide pixels go straight to the frame store at their raster position.
  always_comb begin
    ga         = '0;
    ga.wr_en   = adv && need_in;
    ga.wr_x    = gx;
    ga.wr_y    = gy;
    ga.wr_data = s_guide;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gx <= '0;
      gy <= '0;
    end else if (adv && need_in) begin
      if (32'(gx) == W - 1) begin
        gx <= '0;
        gy <= (32'(gy) == H - 1) ? '0 : crd_t'(gy + 1'b1);
      end else begin
        gx <= crd_t'(gx + 1'b1);
      end
    end
  end

  wls_filter #(.W(W), .H(H), .LAMBDA(LAMBDA), .SIGMA(SIGMA)) u_wls (
    .clk(clk), .rst_n(rst_n), .start(f_start), .busy(f_busy), .done(f_done),
    .pa(f_pa), .pb(f_pb), .ra(ra), .rb(rb));

  depth_divide #(.W(W), .H(H)) u_div (
    .clk(clk), .rst_n(rst_n), .start(v_start), .busy(v_busy), .done(v_done),
    .rq(v_rq), .rs(ra), .m_valid(m_valid), .m_ready(m_ready), .m_depth(m_depth),
    .m_last(m_last));

  // Port a is shared by the phases; port b belongs to the second WLS engine.
  always_comb begin
    pa = '0;
    unique case (st)
      P_LOAD: begin
        pa.wr_en   = dl_valid;
        pa.wr_x    = dl_x;
        pa.wr_y    = dl_y;
        pa.wr_data = words;
      end
      P_FILTER: pa = f_pa;
      P_UNLOAD: pa = v_rq;
      default:  pa = '0;
    endcase
    pb = (st == P_FILTER) ? f_pb : '0;
  end

  frame_banks #(.W(W), .H(H)) u_mem (
    .clk(clk), .rst_n(rst_n), .pa(pa), .pb(pb), .ga(ga), .ra(ra), .rb(rb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P_LOAD;
      f_start <= 1'b0;
      v_start <= 1'b0;
    end else begin
      f_start <= 1'b0;
      v_start <= 1'b0;
      unique case (st)
        P_LOAD:   if (dl_done) begin st <= P_FILTER; f_start <= 1'b1; end
        P_FILTER: if (f_done)  begin st <= P_UNLOAD; v_start <= 1'b1; end
        P_UNLOAD: if (v_done)  st <= P_LOAD;
        default:  st <= P_LOAD;
      endcase
    end
  end

  assign phase = st;

  // The two discontinuity units run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    dl_valid == dr_valid && dl_x == dr_x && dl_y == dr_y && dl_done == dr_done);

endmodule

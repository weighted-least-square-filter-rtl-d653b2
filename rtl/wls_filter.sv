// wls_filter: in-place weighted-least-squares smoothing of the two data
// channels held in frame_banks, guided by the guide image stored beside them.
//
// The 2D smoother is applied as two 1D passes, first down every column
// (vertical pass) and then along every row (horizontal pass). Each line of N
// pixels is one tridiagonal solve done in two phases:
//   forward  Two wls_forward engines run in parallel, engine A on the first
//            half of the line and engine B on the second half. Engine B
//            restarts the recursion at the centre line as if it were the start
//            of a line, so the halves do not wait for each other. Each engine
//            reads one pixel (data + guide) per cycle through its own port
//            (A: pa, B: pb), forms the guide weights with exp_weight, writes
//            d' back in place and keeps e in its half of the line buffer. The
//            weight between the last pixel of A's half and the first of B's is
//            taken from the guide pixel B reads first.
//   backward A wls_backward engine walks the whole line from its end to its
//            start, reading d' and e and writing the result u back in place.
// Lines are taken in pairs, line l and line l + L/2 (L lines in the pass):
// the forward phase of l, then the forward phase of l + L/2, each keeping its
// e in its own line buffer, then the backward phases of both at once, l through
// port pa and l + L/2 through port pb with a second wls_backward engine. The
// two lines lie in opposite halves of the frame, so with the checkerboard bank
// mapping of frame_banks the two backward engines never meet in one bank.
// Both channels (confidence and disparity*confidence) are solved in lockstep:
// they share the guide, hence the weights, the reciprocal and e.
//
// Timing: a forward phase takes N/2 + 2 cycles and the paired backward phase
// N + 1 cycles, so a pair of lines takes 2N + 5 cycles and a frame
// (W/2)*(2H + 5) + (H/2)*(2W + 5) cycles after start; done pulses for one
// cycle at the end. busy is high in between. W and H must be even.
//
// What follows the source: the vertical-then-horizontal order, the forward
// split at the centre line with two parallel engines, the unsplit backward
// sweep, in-place results (no new arrays), the partition of the arrays in two
// halves, and doing two pixels per cycle in the backward processing (the
// source unrolls its loops by two over the partitioned arrays; here the two
// pixels come from the paired lines). This design's choices: one pass per
// direction (no further iterations), the pairing of lines, one pixel per cycle
// per engine, the fixed-point formats, and computing the guide weights on the
// fly instead of storing them.
module wls_filter
  import wls_pkg::*;
#(
  parameter int  W      = 672,
  parameter int  H      = 376,
  parameter int  LAMBDA = 8000,
  parameter real SIGMA  = 1.5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  output fb_req_t pa,
  output fb_req_t pb,
  input  fb_rsp_t ra,
  input  fb_rsp_t rb
);

  localparam int NMAX = (W > H) ? W : H;
  localparam int LMAX = NMAX / 2;

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_t;

  state_t state;
  logic   horiz;              // 0: vertical pass (columns), 1: horizontal pass
  crd_t   line;               // first line of the pair: column (vertical) or row
  logic   fsel;               // forward phase of line (0) or of its partner (1)
  crd_t   k;                  // cycle within the phase
  crd_t   n, half, nlines, lhalf, fline;

  wt_t   ebuf_a [2][LMAX];    // e of the first half of each line of the pair
  wt_t   ebuf_b [2][LMAX];    // e of the second half

  dvec_t pend_d [2];
  pix_t  pend_g [2];
  wt_t   pend_wl [2];
  pix_t  g_b_first;

  pix_t  wg_in [2];
  wt_t   wnew [2];
  logic  f_step, f_first;
  wt_t   f_wr [2];
  wt_t   f_e [2];
  dvec_t f_dp [2];

  logic  b_step, b_first;
  crd_t  b_idx;
  wt_t   b_e [2];
  dvec_t b_u [2];

  always_comb begin
    n      = horiz ? crd_t'(W) : crd_t'(H);
    half   = crd_t'(n >> 1);
    nlines = horiz ? crd_t'(H) : crd_t'(W);
    lhalf  = crd_t'(nlines >> 1);
    fline  = fsel ? crd_t'(line + lhalf) : line;
  end

  // Position p of the current line -> frame coordinates.
  function automatic void to_xy(input logic hz, input crd_t ln, input crd_t p,
                                output crd_t x, output crd_t y);
    x = hz ? p : ln;
    y = hz ? ln : p;
  endfunction

  // Guide weights: pending pixel against the pixel just read; at the end of
  // the forward phase engine A pairs with B's first pixel.
  always_comb begin
    wg_in[0] = (k == crd_t'(half + 1)) ? g_b_first : ra.guide;
    wg_in[1] = rb.guide;
  end

  exp_weight #(.SIGMA(SIGMA)) u_wa (.g_a(pend_g[0]), .g_b(wg_in[0]), .w(wnew[0]));
  exp_weight #(.SIGMA(SIGMA)) u_wb (.g_a(pend_g[1]), .g_b(wg_in[1]), .w(wnew[1]));

  always_comb begin
    f_step  = (state == S_FWD) && (k >= 2);
    f_first = (k == 2);
    f_wr[0] = wnew[0];
    f_wr[1] = (k == crd_t'(half + 1)) ? '0 : wnew[1];
  end

  for (genvar g = 0; g < 2; g++) begin : g_fwd
    wls_forward #(.LAMBDA(LAMBDA)) u_fwd (
      .clk(clk), .rst_n(rst_n), .step(f_step), .first(f_first),
      .d(pend_d[g]), .wl(pend_wl[g]), .wr(f_wr[g]), .e(f_e[g]), .dp(f_dp[g]));
  end

  always_comb begin
    b_step  = (state == S_BWD) && (k >= 1);
    b_first = (k == 1);
    b_idx   = crd_t'(n - k);
    for (int g = 0; g < 2; g++)
      b_e[g] = (b_idx < half) ? ebuf_a[g][b_idx[$clog2(LMAX)-1:0]]
                              : ebuf_b[g][crd_t'(b_idx - half)];
  end

  wls_backward u_bwd0 (
    .clk(clk), .rst_n(rst_n), .step(b_step), .first(b_first),
    .dp(ra.data), .e(b_e[0]), .u(b_u[0]));

  wls_backward u_bwd1 (
    .clk(clk), .rst_n(rst_n), .step(b_step), .first(b_first),
    .dp(rb.data), .e(b_e[1]), .u(b_u[1]));

  // Memory requests.
  always_comb begin
    pa = '0;
    pb = '0;
    if (state == S_FWD) begin
      pa.rd_en = (k < half);
      pb.rd_en = (k < half);
      to_xy(horiz, fline, k, pa.rd_x, pa.rd_y);
      to_xy(horiz, fline, crd_t'(half + k), pb.rd_x, pb.rd_y);
      pa.wr_en = f_step;
      pb.wr_en = f_step;
      to_xy(horiz, fline, crd_t'(k - 2), pa.wr_x, pa.wr_y);
      to_xy(horiz, fline, crd_t'(half + k - 2), pb.wr_x, pb.wr_y);
      pa.wr_data = f_dp[0];
      pb.wr_data = f_dp[1];
    end else if (state == S_BWD) begin
      pa.rd_en = (k < n);
      pb.rd_en = (k < n);
      to_xy(horiz, line, crd_t'(n - 1 - k), pa.rd_x, pa.rd_y);
      to_xy(horiz, crd_t'(line + lhalf), crd_t'(n - 1 - k), pb.rd_x, pb.rd_y);
      pa.wr_en = b_step;
      pb.wr_en = b_step;
      to_xy(horiz, line, b_idx, pa.wr_x, pa.wr_y);
      to_xy(horiz, crd_t'(line + lhalf), b_idx, pb.wr_x, pb.wr_y);
      pa.wr_data = b_u[0];
      pb.wr_data = b_u[1];
    end
  end

  // Line buffers of e, one per line of the pair, one half per forward engine.
  always_ff @(posedge clk) begin
    if (f_step) begin
      ebuf_a[fsel][crd_t'(k - 2)] <= f_e[0];
      ebuf_b[fsel][crd_t'(k - 2)] <= f_e[1];
    end
  end

  // Pending pixel of each forward engine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < 2; g++) begin
        pend_d[g]  <= '0;
        pend_g[g]  <= '0;
        pend_wl[g] <= '0;
      end
      g_b_first <= '0;
    end else if (state == S_FWD && k >= 1 && k <= half) begin
      pend_d[0]  <= ra.data;
      pend_g[0]  <= ra.guide;
      pend_d[1]  <= rb.data;
      pend_g[1]  <= rb.guide;
      pend_wl[0] <= (k == 1) ? '0 : wnew[0];
      pend_wl[1] <= (k == 1) ? '0 : wnew[1];
      if (k == 1) g_b_first <= rb.guide;
    end
  end

  // Sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      horiz <= 1'b0;
      line  <= '0;
      fsel  <= 1'b0;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_FWD;
          horiz <= 1'b0;
          line  <= '0;
          fsel  <= 1'b0;
          k     <= '0;
        end
        S_FWD: begin
          if (k == crd_t'(half + 1)) begin
            k <= '0;
            if (fsel) begin
              fsel  <= 1'b0;
              state <= S_BWD;
            end else begin
              fsel  <= 1'b1;
            end
          end else begin
            k <= crd_t'(k + 1);
          end
        end
        S_BWD: begin
          if (k == n) begin
            k <= '0;
            if (line == crd_t'(lhalf - 1)) begin
              line <= '0;
              if (horiz) begin
                state <= S_IDLE;
                horiz <= 1'b0;
                done  <= 1'b1;
              end else begin
                state <= S_FWD;
                horiz <= 1'b1;
              end
            end else begin
              line  <= crd_t'(line + 1);
              state <= S_FWD;
            end
          end else begin
            k <= crd_t'(k + 1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule

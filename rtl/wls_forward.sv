// wls_forward: one forward-elimination step of the 1D weighted-least-squares
// solve along a line of pixels.
//
// A line (row or column) of S pixels is smoothed by solving the tridiagonal
// system (I + lambda*A) u = d, where pixel x is tied to its neighbours with the
// guide weights w_l (to x-1) and w_r (to x+1). Written with e = -c' (always
// between 0 and 1), the Thomas-algorithm forward sweep is
//   den_x = 1 + lambda*w_r + lambda*w_l*(1 - e_(x-1))
//   e_x   = lambda*w_r / den_x
//   d'_x  = (d_x + lambda*w_l*d'_(x-1)) / den_x
// One reciprocal of den_x is formed per pixel and shared by e and by every
// channel. With first = 1 the step restarts the recursion as at the first pixel
// of a line (w_l is ignored): this is how the split forward processing starts
// its second half at the centre line, trading a little accuracy for two
// independent halves.
//
// Timing: e and dp follow the inputs combinationally; the step is committed
// (becomes x-1 for the next step) on a clock edge with step = 1. Formats: w in
// Q1.16, e in Q0.16, d and dp in Q16.8, reciprocal in Q0.32. Every shift that
// drops bits rounds to nearest: truncation would bias d' low, and with a large
// lambda (e close to 1) both sweeps amplify such a bias about a hundredfold.
// The recurrence
// follows the source's three-point Laplacian system; the formats are this
// design's choice.
module wls_forward
  import wls_pkg::*;
#(
  parameter int LAMBDA = 8000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  logic  first,
  input  dvec_t d,
  input  wt_t   wl,
  input  wt_t   wr,
  output wt_t   e,
  output dvec_t dp
);

  wt_t   e_prev;
  dvec_t dp_prev;

  logic [47:0] lw_l, lw_r, den;
  logic [95:0] recip, e_full;
  logic [95:0] num, prod;

  always_comb begin
    lw_l   = first ? '0 : 48'(LAMBDA) * 48'(wl);
    lw_r   = 48'(LAMBDA) * 48'(wr);
    den    = 48'h10000 + lw_r + ((lw_l * (48'h10000 - 48'(e_prev)) + 48'h8000) >> 16);
    recip  = (96'd1 << 48) / 96'(den);
    e_full = (96'(lw_r) * recip + (96'd1 << 31)) >> 32;
    e      = wt_t'(e_full);
    for (int c = 0; c < NCH; c++) begin
      num   = (96'(d[c]) << 16) + 96'(lw_l) * 96'(dp_prev[c]);
      prod  = (num * recip + (96'd1 << 47)) >> 48;
      dp[c] = (prod >= 96'(1 << D_W)) ? '1 : dval_t'(prod);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev  <= '0;
      dp_prev <= '0;
    end else if (step) begin
      e_prev  <= e;
      dp_prev <= dp;
    end
  end

endmodule

// wls_backward: one back-substitution step of the 1D weighted-least-squares
// solve, walking a line from its last pixel to its first.
//
//   u_x = d'_x + e_x * u_(x+1)          (e = -c' from the forward sweep)
// With first = 1 (the last pixel of the line) u_(x+1) is taken as 0. The
// result is combinational on the inputs and is remembered as u_(x+1) on a clock
// edge with step = 1. Formats: e in Q0.16, d' and u in Q16.8, rounded to
// nearest and saturated to the data word. The backward sweep is not split: it runs over the whole line, so
// the centre-line coupling dropped by the split forward sweep is partly
// restored here.
module wls_backward
  import wls_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  logic  first,
  input  dvec_t dp,
  input  wt_t   e,
  output dvec_t u
);

  dvec_t       u_next;
  logic [47:0] acc;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      acc  = 48'(dp[c]) + ((48'(e) * (first ? 48'd0 : 48'(u_next[c])) + 48'h8000) >> 16);
      u[c] = (acc >= 48'(1 << D_W)) ? '1 : dval_t'(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    u_next <= '0;
    else if (step) u_next <= u;
  end

endmodule

// exp_weight: guide-image similarity weight between two neighbouring pixels.
//
// w = exp(-|g_p - g_q| / SIGMA), the range kernel of the weighted-least-squares
// smoother, returned as unsigned Q1.16 (65536 = 1.0). The 256 possible values of
// |g_p - g_q| index a table that is computed at elaboration from the formula
// (rounded to nearest); in hardware it is a 256 x 17-bit ROM. Purely
// combinational: the weight follows the two guide pixels in the same cycle.
// SIGMA is not given by the source; 1.5 is the usual default of the disparity
// WLS filter this design follows.
module exp_weight
  import wls_pkg::*;
#(
  parameter real SIGMA = 1.5
) (
  input  pix_t g_a,
  input  pix_t g_b,
  output wt_t  w
);

  typedef wt_t lut_t [256];

  function automatic lut_t build_lut(real sigma);
    lut_t t;
    for (int i = 0; i < 256; i++) begin
      t[i] = wt_t'($rtoi($exp(-real'(i) / sigma) * 65536.0 + 0.5));
    end
    return t;
  endfunction

  localparam lut_t LUT = build_lut(SIGMA);

  pix_t diff;
  always_comb begin
    diff = (g_a > g_b) ? pix_t'(g_a - g_b) : pix_t'(g_b - g_a);
    w    = LUT[diff];
  end

endmodule

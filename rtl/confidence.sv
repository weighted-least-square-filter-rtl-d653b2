// confidence: confidence map and disparity-confidence image for one pixel.
//
//   conf     = min(disc_L, disc_R) * 255        (rounded to an 8-bit integer)
//   dispconf = disparity_L * conf               (16-bit integer)
// Both leave as Q16.8 data words, ready to be stored in the frame memory and
// smoothed by the WLS filter (channel 0 = conf, channel 1 = dispconf); their
// 8 fraction bits are 0 here and fill only during smoothing. The
// min-and-scale rule, C = 255 and the product with the left disparity follow
// the source; rounding is this design's choice. Combinational.
module confidence
  import wls_pkg::*;
(
  input  disc_t disc_l,
  input  disc_t disc_r,
  input  pix_t  disp_l,     // left disparity of the same pixel
  output pix_t  conf,
  output dvec_t words       // {dispconf, conf} as Q16.8
);

  disc_t       dmin;
  logic [24:0] prod;
  logic [15:0] dc;

  always_comb begin
    dmin = (disc_l < disc_r) ? disc_l : disc_r;
    prod = 25'(dmin) * 25'd255 + 25'h8000;
    conf = pix_t'(prod >> 16);
    dc   = 16'(disp_l) * 16'(conf);
    words[0] = dval_t'({16'(conf), 8'h00});
    words[1] = dval_t'({dc, 8'h00});
  end

endmodule

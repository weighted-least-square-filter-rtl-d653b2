// dis3x3: discontinuity of one depth-map pixel from its 3x3 neighbourhood.
//
// The variance of the nine disparities is computed as mean of squares minus
// square of mean, kept exact as var = (9*S2 - S1^2) / 81 with S1 = sum x and
// S2 = sum x^2. The discontinuity (a credibility score) is
//   disc = max(0, 1 - var / DISC_SCALE)          (DISC_SCALE = 1000 -> 0.001)
// returned as Q1.16, i.e. 65536 - floor((9*S2 - S1^2) * 65536 / (81*DISC_SCALE)),
// or 0 once the variance reaches DISC_SCALE. The formula and the 0.001 factor
// follow the source; the 3x3 size and the fixed-point rounding are this
// design's choices. Combinational: window in, discontinuity out in the same cycle.
module dis3x3
  import wls_pkg::*;
#(
  parameter int DISC_SCALE = 1000
) (
  input  pix_t  win [9],   // row-major 3x3 window, win[4] is the centre pixel
  output disc_t disc
);

  localparam longint unsigned DEN = 64'(81) * 64'(DISC_SCALE);

  logic [11:0] s1;          // <= 9*255
  logic [19:0] s2;          // <= 9*255^2
  logic [23:0] num;         // 9*S2 - S1^2, >= 0
  logic [47:0] scaled;

  always_comb begin
    s1 = '0;
    s2 = '0;
    for (int i = 0; i < 9; i++) begin
      s1 = s1 + 12'(win[i]);
      s2 = s2 + 20'(win[i]) * 20'(win[i]);
    end
    num    = 24'(24'(s2) * 24'd9 - 24'(s1) * 24'(s1));
    scaled = (48'(num) << 16) / 48'(DEN);
    if (64'(num) >= DEN) disc = '0;
    else                 disc = disc_t'(17'h10000 - scaled[16:0]);
  end

endmodule

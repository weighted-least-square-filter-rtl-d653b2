// discontinuity: streams one depth map through a 3x3 window and emits the
// discontinuity of every pixel in raster order.
//
// The unit walks (W+1) x (H+1) scan positions per frame. At a position inside
// the frame it consumes one input pixel (need_in = 1); the extra last column and
// last row consume nothing and replicate the border pixels, so each output sees
// a full 3x3 window with edge pixels repeated. Two line buffers hold the rows
// above the current one and two column registers hold the previous columns.
// Position (sx, sy) completes the window centred on (sx-1, sy-1); its
// discontinuity (from dis3x3) and centre disparity are registered and appear
// with out_valid one cycle after the advancing edge.
//
// Handshake: the position advances on a clock edge where adv = 1; the owner
// raises adv only when need_in = 0 or in_pix is valid. frame_done pulses with
// the last output of a frame. The source runs the left and right maps through
// two such units in parallel; line buffering, border replication and the scan
// order are this design's choices.
module discontinuity
  import wls_pkg::*;
#(
  parameter int W          = 672,
  parameter int H          = 376,
  parameter int DISC_SCALE = 1000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  output logic  need_in,
  input  pix_t  in_pix,
  output logic  out_valid,
  output crd_t  out_x,
  output crd_t  out_y,
  output disc_t out_disc,
  output pix_t  out_center,
  output logic  frame_done
);

  pix_t lb1 [W];          // row sy-1
  pix_t lb2 [W];          // row sy-2
  crd_t sx, sy;
  pix_t p1 [3];           // column sx-1 (top, mid, bottom)
  pix_t p2 [3];           // column sx-2
  pix_t col [3];          // column sx
  pix_t win [9];
  disc_t disc;
  logic [$clog2(W)-1:0] ix;

  assign need_in = (32'(sx) < W) && (32'(sy) < H);

  always_comb begin
    ix = (32'(sx) < W) ? sx[$clog2(W)-1:0] : '0;
    if (32'(sx) < W) begin
      col[0] = lb2[ix];
      col[1] = lb1[ix];
      col[2] = (32'(sy) < H) ? in_pix : lb1[ix];
    end else begin
      col = p1;
    end
    for (int r = 0; r < 3; r++) begin
      win[r*3 + 0] = p2[r];
      win[r*3 + 1] = p1[r];
      win[r*3 + 2] = col[r];
    end
  end

  dis3x3 #(.DISC_SCALE(DISC_SCALE)) u_dis3x3 (.win(win), .disc(disc));

  always_ff @(posedge clk) begin
    if (adv && (32'(sx) < W)) begin
      lb1[ix] <= col[2];
      lb2[ix] <= (sy == '0) ? col[2] : lb1[ix];
    end
    if (adv) begin
      if (sx == '0) begin
        p1 <= col;
        p2 <= col;
      end else begin
        p2 <= p1;
        p1 <= col;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx         <= '0;
      sy         <= '0;
      out_valid  <= 1'b0;
      out_x      <= '0;
      out_y      <= '0;
      out_disc   <= '0;
      out_center <= '0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= adv && (sx != '0) && (sy != '0);
      frame_done <= adv && (32'(sx) == W) && (32'(sy) == H);
      if (adv) begin
        out_x      <= crd_t'(sx - 1'b1);
        out_y      <= crd_t'(sy - 1'b1);
        out_disc   <= disc;
        out_center <= p1[1];
        if (32'(sx) == W) begin
          sx <= '0;
          sy <= (32'(sy) == H) ? '0 : crd_t'(sy + 1'b1);
        end else begin
          sx <= crd_t'(sx + 1'b1);
        end
      end
    end
  end

endmodule

// wls_pkg: types and constants shared by the depth-map post-filter.
//
// The filter turns a left/right pair of 8-bit disparity maps and an 8-bit guide
// image into one smoothed disparity map. This package fixes the number formats
// used between its stages:
//   * pixels (disparity, guide)      : unsigned 8-bit integers
//   * discontinuity                  : unsigned Q1.16, 0 .. 1.0 (65536)
//   * guide weights and the forward  : unsigned Q1.16 / Q0.16
//     elimination factor e (= -c')
//   * filtered data words            : unsigned Q16.8, 24 bits, enough for
//                                      disparity*confidence = 255*255 with 8
//                                      fraction bits
// The formats are this design's choice; the source algorithm is stated in real
// numbers. The frame memories are addressed by (x, y) coordinates of CRD_W bits.
package wls_pkg;

  localparam int PIX_W   = 8;   // disparity and guide pixel width
  localparam int WT_FRAC = 16;  // fraction bits of weights and of e
  localparam int WT_W    = 17;  // weight 0 .. 1.0 inclusive
  localparam int DISC_W  = 17;  // discontinuity 0 .. 1.0 inclusive (Q1.16)
  localparam int D_FRAC  = 8;   // fraction bits of a filtered data word
  localparam int D_W     = 24;  // filtered data word (Q16.8)
  localparam int NCH     = 2;   // channels filtered in lockstep: 0 = confidence,
                                // 1 = disparity * confidence
  localparam int CRD_W   = 11;  // x / y coordinate width (frames up to 2047 wide)

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WT_W-1:0]   wt_t;
  typedef logic [DISC_W-1:0] disc_t;
  typedef logic [D_W-1:0]    dval_t;
  typedef dval_t [NCH-1:0]   dvec_t;
  typedef logic [CRD_W-1:0]  crd_t;

  // One access port of the banked frame store: a synchronous read (data one
  // cycle later) and a write, each addressed by pixel coordinates.
  typedef struct packed {
    logic  rd_en;
    crd_t  rd_x;
    crd_t  rd_y;
    logic  wr_en;
    crd_t  wr_x;
    crd_t  wr_y;
    dvec_t wr_data;
  } fb_req_t;

  // Guide-image write (loading only).
  typedef struct packed {
    logic wr_en;
    crd_t wr_x;
    crd_t wr_y;
    pix_t wr_data;
  } gd_req_t;

  // Read data returned by the frame store.
  typedef struct packed {
    dvec_t data;
    pix_t  guide;
  } fb_rsp_t;

endpackage

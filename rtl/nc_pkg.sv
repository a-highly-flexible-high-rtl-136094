// nc_pkg: shared constants and types of the noise cancelling pipeline.
//
// Pixels travel as beats of NPIX = 8 adjacent pixels of one image line
// (the filter and gain stages both process eight pixels per clock), each
// PIX_W = 10 bits wide as delivered by the sensor's column ADCs. A beat
// carries three framing flags: sof on the first beat of a frame, eol on the
// last beat of every line and eof on the last beat of the frame.
// Compensation coefficients are unsigned fixed point with COEF_F fractional
// bits; this format is a choice of this design.
package nc_pkg;
  localparam int unsigned NPIX   = 8;    // pixels per beat
  localparam int unsigned PIX_W  = 10;   // bits per pixel
  localparam int unsigned COEF_W = 16;   // coefficient width (unsigned, Q2.14)
  localparam int unsigned COEF_F = 14;   // coefficient fractional bits
  localparam logic [COEF_W-1:0] COEF_ONE = COEF_W'(1) << COEF_F;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [COEF_W-1:0] coef_t;

  typedef struct packed {
    logic                  sof;
    logic                  eol;
    logic                  eof;
    logic [NPIX-1:0][PIX_W-1:0] px;   // px[0] is the leftmost pixel
  } beat_t;
endpackage

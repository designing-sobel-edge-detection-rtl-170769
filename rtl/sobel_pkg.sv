// sobel_pkg - types and constants shared by the Sobel edge-detection pipeline.
//
// Pixels are 8-bit unsigned grayscale intensities (0..255). A Sobel
// gradient over a 3x3 window of such pixels lies in -1020..+1020, so it fits
// an 11-bit signed value; |Gx|+|Gy| lies in 0..2040 and fits an 11-bit
// unsigned value. The 3x3 kernels are the standard Sobel masks:
//
//   Gx = [-1 0 +1; -2 0 +2; -1 0 +1]     Gy = [-1 -2 -1; 0 0 0; +1 +2 +1]
//
// A window is a packed 3x3 array indexed [row][col]; row 0 is the oldest
// (top) image row and col 0 the leftmost (oldest) column.
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;   // grayscale pixel width
  localparam int unsigned GRAD_W = 11;  // signed Gx / Gy width
  localparam int unsigned MAG_W  = 11;  // unsigned |Gx|+|Gy| width

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;
  typedef pixel_t [2:0][2:0]        window_t;

  // Output-side result of one pixel: 8-bit magnitude image value and
  // binary edge decision.
  typedef struct packed {
    pixel_t mag8;
    logic   edge_bit;
  } result_t;

endpackage

// edge_pkg: types and constants shared by the streaming edge-detection
// pipeline (grayscale -> line buffers -> 3x3 window -> Sobel -> gradient and
// threshold). Pixels are 8-bit unsigned, the colour input is 8 bits per
// channel. Gradient values are 11 bits: a Sobel response lies in
// [-1020, 1020], so |Gx| + |Gy| lies in [0, 2040]. These widths are this
// design's own choice; the conversion to an unsigned-integer gray pixel
// follows the reference design.
package edge_pkg;
  localparam int PIX_W  = 8;
  localparam int GRAD_W = 11;           // signed Sobel output / unsigned magnitude

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  // Column of three vertically adjacent pixels, [0] = oldest row (top).
  typedef pix_t [2:0] col_t;
  // 3x3 window, win[row][col]; row 0 = top, col 0 = left (P11 = win[0][0]).
  typedef pix_t [2:0][2:0] win_t;

  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [GRAD_W-1:0]        mag_t;
endpackage

// gauss_pkg: types and constants shared by the 3x3 Gaussian smoothing filter.
//
// Pixels are 8-bit grey values. A 3x3 neighbourhood is a packed array
// win_t[row][col], row 0 being the oldest image row and col 0 the leftmost
// column. The kernel is the integer approximation of a sigma = 1 Gaussian,
// (1/16) * [1 2 1; 2 4 2; 1 2 1], applied by right shifts of each pixel
// (corner >> 4, edge >> 3, centre >> 2) so that every term, and every
// partial sum of terms, fits the 8-bit approximate adders (largest total
// 4*15 + 4*31 + 63 = 247). The sigma = 1 kernel follows the published
// design; its power-of-two form and the pre-shifting are this
// design's choices.
package gauss_pkg;

  localparam int unsigned PIX_W = 8;

  typedef logic [PIX_W-1:0] pix_t;
  typedef pix_t [2:0][2:0]  win_t;

  // Right shift applied to the pixel at window position (r, c).
  function automatic int unsigned kernel_shift(int unsigned r, int unsigned c);
    int unsigned off_ctr;
    off_ctr = ((r == 1) ? 0 : 1) + ((c == 1) ? 0 : 1);
    return 2 + off_ctr;   // centre 2, edges 3, corners 4
  endfunction

endpackage

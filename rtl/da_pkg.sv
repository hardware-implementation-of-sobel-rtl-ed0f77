// da_pkg: types and constants shared by the Sobel distributed-arithmetic
// (DA) edge filter.
//
// The filter computes a 3x3 2-D convolution y(m,n) = sum_k sum_l
// x(m-k,n-l) h(k,l) without multipliers: the nine window pixels are
// shifted out one bit plane at a time, each bit plane addresses a
// 512-word ROM holding the sum of the selected coefficients, and a
// scaling accumulator adds the ROM words with binary weights (the sign
// plane is subtracted).
//
// Coefficients are kept as a flat array of nine entries, entry 3*k+l
// holding h(k,l) (row k, column l of the mask). ROM address bit 8-(3*k+l)
// carries the bit of pixel x(m-k,n-l), so address bit 0 selects h(2,2) and
// address bit 8 selects h(0,0), as in the partial-product table of the
// design. The two Sobel masks below are the standard ones; which of them
// is called "vertical" follows the convention that the vertical gradient
// measures change along the image rows index m.
package da_pkg;

  // Pixel and bit-serial sizes.
  localparam int unsigned PIX_W  = 8;    // bits per pixel (B)
  localparam int unsigned ROM_W  = 8;    // bits per partial-product ROM word
  localparam int unsigned TAPS   = 9;    // 3x3 mask
  localparam int unsigned ADDR_W = TAPS; // ROM address bits
  localparam int unsigned IMG_W  = 256;  // pixels per image line
  localparam int unsigned OUT_W  = 8;    // bits per output image sample

  typedef logic [PIX_W-1:0] pix_t;
  // win[k][l] = x(m-k, n-l)
  typedef logic [2:0][2:0][PIX_W-1:0] win_t;

  typedef int mask_t [TAPS];

  // Vertical gradient: rows m-2 minus rows m, weights 1 2 1.
  localparam mask_t SOBEL_VER = '{-1, -2, -1,
                                   0,  0,  0,
                                   1,  2,  1};
  // Horizontal gradient: columns n-2 minus columns n, weights 1 2 1.
  localparam mask_t SOBEL_HOR = '{-1,  0,  1,
                                  -2,  0,  2,
                                  -1,  0,  1};

  // Control strobes of one pixel period.
  typedef struct packed {
    logic lr_img;  // take the next input pixel into the frame manager
    logic lr;      // load the PISO bank from the window
    logic ld_out;  // load the output buffers (lr once results exist)
    logic clacc;   // clear the accumulators
    logic lacc;    // accumulate one bit plane and shift the PISO bank
    logic sa_sub;  // with lacc: subtract (sign plane) instead of add
  } ctrl_t;

  // Clocks per pixel: one load, one clear, PIX_W bit planes.
  localparam int unsigned PERIOD = PIX_W + 2;

  // Partial product F(a): sum of the coefficients whose address bit is set.
  function automatic int partial_product(mask_t h, int unsigned a);
    int s;
    s = 0;
    for (int f = 0; f < int'(TAPS); f++)
      if (((a >> (TAPS - 1 - f)) & 1) != 0) s += h[f];
    return s;
  endfunction

endpackage

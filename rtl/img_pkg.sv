// img_pkg: types and constants shared by the image-processing pipeline.
//
// Pixels are 8-bit unsigned grayscale samples. All kernel arithmetic is
// carried in 16-bit signed fixed-point words (acc_t), which hold the largest
// intermediate value of either kernel with room to spare: the Gaussian sum
// reaches 16*255 = 4080 and each Sobel gradient lies in [-1020, 1020].
// A 3x3 window is a packed array indexed [row][column], row 0 on top and
// column 0 on the left, so win[1][1] is the centre pixel.
// The 16-bit fixed-point width follows the published design; the 8-bit pixel is
// this design's choice for grayscale input.
package img_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned ACC_W = 16;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef pix_t [2:0][2:0]         win_t;

  // Word written back to host memory for every pixel.
  typedef struct packed {
    pix_t grad;    // Sobel gradient magnitude (edge strength)
    pix_t smooth;  // Gaussian-smoothed pixel
  } out_word_t;

  // Widen an unsigned pixel into the fixed-point accumulator type.
  function automatic acc_t to_acc(pix_t p);
    return acc_t'({{(ACC_W-PIX_W){1'b0}}, p});
  endfunction

endpackage

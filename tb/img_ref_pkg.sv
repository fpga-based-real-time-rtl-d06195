// img_ref_pkg: integer reference model of the image pipeline, for
// testbenches only.
//
// gauss() smooths a W x H image with (1/16)[1 2 1; 2 4 2; 1 2 1], rounding
// to nearest; sobel() returns |Gx| + |Gy| clipped to 255. Both write zero
// on the outermost rows and columns, where the 3x3 neighbourhood leaves the
// image. Images are flat arrays in raster order, index y*W + x.
package img_ref_pkg;

  typedef int img_t [];

  function automatic img_t gauss(img_t src, int w, int h);
    img_t dst = new[w * h];
    int k [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int s = 0;
        if (x == 0 || y == 0 || x == w - 1 || y == h - 1) begin
          dst[y*w + x] = 0;
          continue;
        end
        for (int r = -1; r <= 1; r++)
          for (int c = -1; c <= 1; c++)
            s += k[r+1][c+1] * src[(y+r)*w + (x+c)];
        dst[y*w + x] = (s + 8) / 16;
      end
    return dst;
  endfunction

  function automatic img_t sobel(img_t src, int w, int h, ref int clipped);
    img_t dst = new[w * h];
    int kx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int ky [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int gx = 0, gy = 0, m;
        if (x == 0 || y == 0 || x == w - 1 || y == h - 1) begin
          dst[y*w + x] = 0;
          continue;
        end
        for (int r = -1; r <= 1; r++)
          for (int c = -1; c <= 1; c++) begin
            gx += kx[r+1][c+1] * src[(y+r)*w + (x+c)];
            gy += ky[r+1][c+1] * src[(y+r)*w + (x+c)];
          end
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        if (m > 255) begin
          m = 255;
          clipped++;
        end
        dst[y*w + x] = m;
      end
    return dst;
  endfunction

  // Test picture: a bright rectangle on a dark ground (strong edges that
  // clip the Sobel magnitude) plus random noise of amplitude `noise`.
  function automatic img_t test_image(int w, int h, int noise);
    img_t im = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v = (x > w / 4 && x < 3 * w / 4 && y > h / 4 && y < 3 * h / 4) ? 200 : 30;
        v += $urandom_range(noise);
        im[y*w + x] = (v > 255) ? 255 : v;
      end
    return im;
  endfunction

endpackage

// edge_ref_pkg: reference model of the edge detector for the testbenches,
// written independently of the RTL with plain integer arithmetic and the
// textbook 3x3 Sobel kernels (with multiplications):
//   gray = (R + 2G + B) / 4
//   Gx, Gy = Sobel kernels applied to the gray neighbourhood of (x, y)
//   mag = |Gx| + |Gy|, is_edge = mag > threshold
// Results exist for interior pixels only (1 <= x <= W-2, 1 <= y <= H-2) and
// are listed in raster order. It also generates test images.
package edge_ref_pkg;
  import edge_pkg::*;

  typedef struct {
    int   mag;
    bit   is_edge;
    bit   sof;
    bit   eol;
  } result_t;

  function automatic int gray_of(rgb_t p);
    return (int'(p.r) + 2 * int'(p.g) + int'(p.b)) / 4;
  endfunction

  // img is W*H pixels in raster order; the results are appended to q.
  function automatic void expected(input rgb_t img[], input int w, input int h,
                                   input int thr, ref result_t q[$]);
    int g[];
    g = new[w * h];
    for (int i = 0; i < w * h; i++) g[i] = gray_of(img[i]);
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++) begin
        int gx, gy;
        result_t r;
        gx = (g[(y-1)*w + x+1] + 2*g[y*w + x+1] + g[(y+1)*w + x+1])
           - (g[(y-1)*w + x-1] + 2*g[y*w + x-1] + g[(y+1)*w + x-1]);
        gy = (g[(y+1)*w + x-1] + 2*g[(y+1)*w + x] + g[(y+1)*w + x+1])
           - (g[(y-1)*w + x-1] + 2*g[(y-1)*w + x] + g[(y-1)*w + x+1]);
        r.mag  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        r.is_edge = (r.mag > thr);
        r.sof  = (x == 1 && y == 1);
        r.eol  = (x == w - 2);
        q.push_back(r);
      end
  endfunction

  // Test image: a bright disc on a dark background with a vertical bar and
  // some noise (style 0), or random pixels (style 1).
  function automatic void make_image(ref rgb_t img[], input int w, input int h, input int style);
    img = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        rgb_t p;
        if (style == 1) begin
          p = rgb_t'($urandom);
        end else begin
          int dx = x - w / 2, dy = y - h / 2, rr = (w < h ? w : h) / 3;
          int v = (dx*dx + dy*dy < rr*rr) ? 200 : 30;
          if (x == w / 5 || x == w / 5 + 1) v = 250;
          v += $urandom_range(0, 7);
          p.r = pix_t'(v); p.g = pix_t'(v - 5); p.b = pix_t'(v);
        end
        img[y * w + x] = p;
      end
  endfunction
endpackage

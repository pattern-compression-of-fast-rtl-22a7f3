// fast_tb_pkg: test images and a reference FAST-N corner detector for the
// detector testbenches.
//
// make_image fills a width*height raster (index y*width + x) with a noisy
// mid-grey background, random bright and dark rectangles (their corners are
// FAST corners) and isolated bright or dark dots (which every ring point sees
// as darker or brighter). ref_corner applies the segment test directly to the
// three-state ring of Eq. (1): a corner when at least N contiguous ring points
// are all darker than I(p) - t or all brighter than I(p) + t. It has its own
// table of ring offsets and shares no code with the design.
package fast_tb_pkg;

  typedef logic [7:0] image_t [];

  const int RDX [16] = '{ 0,  1,  2,  3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  const int RDY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3,  3,  2,  1,  0, -1, -2, -3};

  function automatic int clamp8(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic void make_image(ref image_t img, input int width, input int height);
    int n_rect = (width * height) / 300 + 1;
    int n_dot  = (width * height) / 250 + 1;
    img = new[width * height];
    for (int i = 0; i < width * height; i++)
      img[i] = 8'(90 + $urandom_range(0, 20));
    for (int r = 0; r < n_rect; r++) begin
      int x0 = $urandom_range(0, width - 1);
      int y0 = $urandom_range(0, height - 1);
      int w  = $urandom_range(3, 24);
      int h  = $urandom_range(3, 24);
      int v  = $urandom_range(0, 255);
      for (int y = y0; y < y0 + h && y < height; y++)
        for (int x = x0; x < x0 + w && x < width; x++)
          img[y * width + x] = 8'(clamp8(v + int'($urandom_range(0, 6)) - 3));
    end
    for (int d = 0; d < n_dot; d++) begin
      int i = $urandom_range(0, width * height - 1);
      int s = $urandom_range(60, 140);
      img[i] = 8'(clamp8(int'(img[i]) + (($urandom_range(0, 1) != 0) ? s : -s)));
    end
  endfunction

  // 0 = similar, 1 = darker, 2 = brighter, as in Eq. (1)
  function automatic bit ref_corner(ref image_t img, input int width, input int x, input int y,
                                    input int t, input int n);
    int st [16];
    int ip = int'(img[y * width + x]);
    for (int k = 0; k < 16; k++) begin
      int ix = int'(img[(y + RDY[k]) * width + (x + RDX[k])]);
      st[k] = (ix <= ip - t) ? 1 : (ip + t <= ix) ? 2 : 0;
    end
    for (int want = 1; want <= 2; want++) begin
      int run = 0;
      for (int k = 0; k < 32; k++) begin
        if (st[k % 16] == want) run++; else run = 0;
        if (run >= n) return 1;
      end
    end
    return 0;
  endfunction

  // 1 when the brighter points outnumber the darker ones (which split pattern
  // the detector should look up)
  function automatic bit ref_bright(ref image_t img, input int width, input int x, input int y,
                                    input int t);
    int nd = 0, nb = 0;
    int ip = int'(img[y * width + x]);
    for (int k = 0; k < 16; k++) begin
      int ix = int'(img[(y + RDY[k]) * width + (x + RDX[k])]);
      if (ix <= ip - t) nd++;
      if (ip + t <= ix) nb++;
    end
    return nb > nd;
  endfunction

endpackage

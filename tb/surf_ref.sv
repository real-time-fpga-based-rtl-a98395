// surf_ref: reference model shared by the feature detector and top-level
// testbenches. It computes the normalised Hessian score of every filter
// size straight from pixel box sums, and the scale-space maxima, for an
// image held in an array, without integral images or separable sums.
package surf_ref;
  import surf_pkg::*;

  function automatic int off(input int k, input int s);
    return int'($floor(real'(k) * real'(s) / 9.0 + 0.5));
  endfunction

  // filter size of interval i
  function automatic int fsize(input int i);
    return 9 + 6 * i;
  endfunction

  // normalised score of size s centred at (cx, cy); img is row-major, width w.
  // Box sums come from a row-wise prefix table rp (rp[y*(w+1)+x] = sum of the
  // first x pixels of row y), which keeps the model fast and is independent
  // of the design's two-dimensional integral image.
  function automatic longint score(ref int rp [], input int w, input int s,
                                   input int cx, input int cy);
    int o [10];
    int ox, oy;
    longint dxx, dyy, dxy, sq, h, k;
    ox = cx - (s + 1) / 2;
    oy = cy - (s + 1) / 2;
    for (int i = 0; i < 10; i++) o[i] = off(i, s);
    dxx = box(rp, w, ox, oy, o[0], o[2], o[9], o[7]) - 3 * box(rp, w, ox, oy, o[3], o[2], o[6], o[7]);
    dyy = box(rp, w, ox, oy, o[2], o[0], o[7], o[9]) - 3 * box(rp, w, ox, oy, o[2], o[3], o[7], o[6]);
    dxy = box(rp, w, ox, oy, o[1], o[1], o[4], o[4]) + box(rp, w, ox, oy, o[5], o[5], o[8], o[8])
        - box(rp, w, ox, oy, o[5], o[1], o[8], o[4]) - box(rp, w, ox, oy, o[1], o[5], o[4], o[8]);
    sq = dxy * dxy;
    h  = dxx * dyy - (sq - sq / 8);
    k  = longint'($floor(65536.0 * 6561.0 / (real'(s) ** 4) + 0.5));
    return (h * k) >>> 16;
  endfunction

  // pixels in columns (c0, c1] and rows (r0, r1] relative to (ox, oy)
  function automatic longint box(ref int rp [], input int w, input int ox, input int oy,
                                 input int c0, input int r0, input int c1, input int r1);
    longint s = 0;
    for (int y = oy + r0 + 1; y <= oy + r1; y++) begin
      int d;
      d = rp[y * (w + 1) + ox + c1 + 1] - rp[y * (w + 1) + ox + c0 + 1];
      s += longint'(d);
    end
    return s;
  endfunction

  // row prefix table of an image
  function automatic void prefix(ref int img [], ref int rp [], input int w, input int h);
    rp = new[(w + 1) * h];
    for (int y = 0; y < h; y++) begin
      rp[y * (w + 1)] = 0;
      for (int x = 0; x < w; x++) rp[y * (w + 1) + x + 1] = rp[y * (w + 1) + x] + img[y * w + x];
    end
  endfunction

  // score map of filter size s for every centre whose window lies inside
  // the image (0 elsewhere), row-major
  function automatic void score_map(ref int rp [], input int w, input int h, input int s,
                                    ref longint map []);
    map = new[w * h];
    for (int cy = 0; cy < h; cy++)
      for (int cx = 0; cx < w; cx++) begin
        int ox, oy;
        ox = cx - (s + 1) / 2;
        oy = cy - (s + 1) / 2;
        map[cy * w + cx] = (ox >= 0 && oy >= 0 && ox + s < w && oy + s < h)
                         ? score(rp, w, s, cx, cy) : 0;
      end
  endfunction

  // maxima mask of pixel (cx, cy) from the four score maps m0..m3:
  // bit m-1 set when interval m (1..NSCALE-2) holds a maximum
  function automatic int maxima(ref longint m0 [], ref longint m1 [], ref longint m2 [],
                                ref longint m3 [], input int w, input int cx, input int cy,
                                input longint thr);
    longint v [NSCALE][3][3];
    int res;
    res = 0;
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++) begin
        int i;
        i = (cy + dy - 1) * w + cx + dx - 1;
        v[0][dy][dx] = m0[i];
        v[1][dy][dx] = m1[i];
        v[2][dy][dx] = m2[i];
        v[3][dy][dx] = m3[i];
      end
    for (int m = 1; m <= NSCALE - 2; m++) begin
      bit ok;
      ok = (v[m][1][1] > thr);
      for (int s = m - 1; s <= m + 1; s++)
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++)
            if (!(s == m && dy == 1 && dx == 1) && v[s][dy][dx] >= v[m][1][1]) ok = 0;
      if (ok) res |= (1 << (m - 1));
    end
    return res;
  endfunction

  // test image: noise plus bright and dark square blobs
  function automatic void make_image(ref int img [], input int w, input int h, input int nblobs);
    img = new[w * h];
    for (int i = 0; i < w * h; i++) img[i] = 60 + int'($urandom_range(0, 20));
    for (int b = 0; b < nblobs; b++) begin
      int bx, by, r, v;
      bx = $urandom_range(10, w - 11);
      by = $urandom_range(10, h - 11);
      r  = $urandom_range(1, 4);
      v  = ($urandom_range(0, 1) != 0) ? 250 : 0;
      for (int y = by - r; y <= by + r; y++)
        for (int x = bx - r; x <= bx + r; x++) img[y * w + x] = v;
    end
  endfunction

endpackage

// tb_amf_ref_pkg: reference model and image generator shared by the
// adaptive-median-filter testbenches. Written independently of the RTL:
// it sorts the window with the simulator's sort() instead of ranking.
package tb_amf_ref_pkg;

  typedef int img_t[];   // w*h pixels, raster order

  // Smooth gradient with salt (255) and pepper (0) impulses at the given
  // density in percent; dense clusters of impulses are added so that some
  // 3x3 medians are themselves impulses.
  function automatic img_t make_image(int w, int h, int density);
    img_t im = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        im[y*w + x] = 40 + ((x * 3 + y * 5) % 150) + $urandom_range(0, 6);
        if ($urandom_range(0, 99) < density)
          im[y*w + x] = $urandom_range(0, 1) ? 255 : 0;
      end
    // clusters: 3x3 blocks of salt
    for (int n = 0; n < (w * h) / 64; n++) begin
      int cx = $urandom_range(0, w - 3), cy = $urandom_range(0, h - 3);
      int v  = $urandom_range(0, 1) ? 255 : 0;
      for (int dy = 0; dy < 3; dy++)
        for (int dx = 0; dx < 3; dx++)
          if ($urandom_range(0, 9) < 8) im[(cy+dy)*w + cx + dx] = v;
    end
    return im;
  endfunction

  // Noise-free gradient (values 40..195, never an extreme value) and a copy
  // with salt-and-pepper noise of the given density in percent.
  function automatic img_t make_clean(int w, int h);
    img_t im = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        im[y*w + x] = 40 + ((x * 3 + y * 5) % 150) + $urandom_range(0, 6);
    return im;
  endfunction

  function automatic img_t add_noise(const ref img_t clean, input int density);
    img_t im = new[clean.size()];
    foreach (clean[i])
      im[i] = ($urandom_range(0, 99) < density) ? ($urandom_range(0, 1) ? 255 : 0)
                                                : clean[i];
    return im;
  endfunction

  // Minimum, median, maximum of the k x k window centred at (cx, cy).
  function automatic void stats(const ref img_t im, input int w, cx, cy, k,
                                output int mn, md, mx);
    int v[$];
    for (int dy = -(k/2); dy <= k/2; dy++)
      for (int dx = -(k/2); dx <= k/2; dx++)
        v.push_back(im[(cy+dy)*w + cx + dx]);
    v.sort();
    mn = v[0];
    md = v[v.size()/2];
    mx = v[v.size()-1];
  endfunction

  // Filtered value of pixel (cx, cy); enl/rep report the 5x5 window and a
  // replacement.
  function automatic int filter_px(const ref img_t im, input int w, h, cx, cy,
                                   output bit enl, output bit rep);
    int z = im[cy*w + cx];
    int mn, md, mx;
    enl = 0;
    rep = 0;
    if (cx < 2 || cy < 2 || cx >= w - 2 || cy >= h - 2) return z;
    for (int k = 3; k <= 5; k += 2) begin
      stats(im, w, cx, cy, k, mn, md, mx);
      if (mn < md && md < mx) begin
        if (mn < z && z < mx) return z;
        rep = 1;
        return md;
      end
      enl = 1;
    end
    rep = 1;
    return md;
  endfunction

endpackage

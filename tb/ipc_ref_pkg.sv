// ipc_ref_pkg: software reference models used by the testbenches. They
// compute, pixel by pixel on whole-frame arrays, what the pipeline stages
// must produce: the directional-mean filter with the SortFour clamp, the
// iterative stage A / stage B impulse test (median by sorting), the
// integer Haar subbands, and a test-image generator with salt-and-pepper
// noise. They are written from the algorithm description, not from the RTL
// (no shared code), so that a mismatch points at a real difference.
package ipc_ref_pkg;
  typedef int img_t[];

  function automatic int at(const ref img_t img, input int w, input int x, input int y);
    return img[y*w + x];
  endfunction

  // Smooth ramp with texture and salt-and-pepper impulses at density
  // noise_pct percent.
  function automatic img_t make_image(input int w, input int h, input int noise_pct);
    img_t img = new[w*h];
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        int v = (x * 200) / w + (y * 40) / h + int'($urandom_range(0, 12));
        if (int'($urandom_range(0, 99)) < noise_pct) v = ($urandom_range(0, 1) != 0) ? 255 : 0;
        img[y*w + x] = (v > 255) ? 255 : v;
      end
    end
    return img;
  endfunction

  // Copy of a clean image with salt-and-pepper impulses at noise_pct percent.
  function automatic img_t add_noise(const ref img_t clean, input int noise_pct);
    img_t img = new[clean.size()];
    foreach (clean[i]) begin
      img[i] = clean[i];
      if (int'($urandom_range(0, 99)) < noise_pct) img[i] = ($urandom_range(0, 1) != 0) ? 255 : 0;
    end
    return img;
  endfunction

  // Mean squared error between two images of equal size.
  function automatic real mse(const ref img_t x, const ref img_t y);
    real acc = 0.0;
    foreach (x[i]) acc += real'((x[i] - y[i]) * (x[i] - y[i]));
    return acc / real'(x.size());
  endfunction

  // PSNR in dB for 8-bit images (peak 255).
  function automatic real psnr(input real m);
    if (m <= 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / m);
  endfunction

  // Directional mean: candidates (contrast, mean) in fixed priority order.
  function automatic int ref_dir_mean(input int a, b, c, d, e, f, g, h, output int dir);
    int con[5], mn[5], best;
    con[0] = (d > e) ? d - e : e - d; mn[0] = (d + e) / 2;
    con[1] = (b > g) ? b - g : g - b; mn[1] = (b + g) / 2;
    con[2] = (a > h) ? a - h : h - a; mn[2] = (a + h) / 2;
    con[3] = (c > f) ? c - f : f - c; mn[3] = (c + f) / 2;
    con[4] = (a > c) ? a - c : c - a; mn[4] = (a + 2*b + c) / 4;
    best = 0;
    for (int k = 1; k < 5; k++) if (con[k] < con[best]) best = k;
    dir = best;
    return mn[best];
  endfunction

  function automatic img_t ref_avg_filter(const ref img_t src, input int w, input int h);
    img_t dst = new[w*h];
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        if (x == 0 || y == 0 || x == w-1 || y == h-1) begin
          dst[y*w+x] = at(src, w, x, y);
        end else begin
          int fb, dir;
          int s[$];
          fb = ref_dir_mean(at(src,w,x-1,y-1), at(src,w,x,y-1), at(src,w,x+1,y-1),
                            at(src,w,x-1,y),                    at(src,w,x+1,y),
                            at(src,w,x-1,y+1), at(src,w,x,y+1), at(src,w,x+1,y+1), dir);
          s = '{at(src,w,x,y-1), at(src,w,x-1,y), at(src,w,x+1,y), at(src,w,x,y+1)};
          s.sort();
          if (s[1] > fb) dst[y*w+x] = s[1];
          else if (s[2] < fb) dst[y*w+x] = s[2];
          else dst[y*w+x] = fb;
        end
      end
    end
    return dst;
  endfunction

  // Iterative stage A / stage B. level[] receives the number of failed
  // stage A iterations (ns when no window decided), repl[] whether the
  // median replaced the pixel.
  function automatic img_t ref_impulse(const ref img_t src, input int w, input int h,
                                       input int tmax, ref img_t level, ref img_t repl);
    int ns = (tmax - 1) / 2;
    img_t dst = new[w*h];
    level = new[w*h];
    repl = new[w*h];
    for (int y = 0; y < h; y++) begin
      for (int x = 0; x < w; x++) begin
        int xy = at(src, w, x, y);
        dst[y*w+x] = xy;
        level[y*w+x] = ns;
        repl[y*w+x] = 0;
        for (int r = 1; r <= ns; r++) begin
          int q[$];
          int mn, md, mx;
          if (x < r || y < r || x >= w - r || y >= h - r) break;
          for (int dy = -r; dy <= r; dy++)
            for (int dx = -r; dx <= r; dx++) q.push_back(at(src, w, x+dx, y+dy));
          q.sort();
          mn = q[0]; mx = q[q.size()-1]; md = q[q.size()/2];
          if (mn < md && md < mx) begin
            level[y*w+x] = r - 1;
            if (!(mn < xy && xy < mx)) begin
              dst[y*w+x] = md;
              repl[y*w+x] = 1;
            end
            break;
          end
        end
      end
    end
    return dst;
  endfunction

  // Integer Haar subbands of the 2x2 block at block coordinates (bx, by).
  function automatic void ref_haar(const ref img_t src, input int w, input int bx, input int by,
                                   output int ll, output int lh, output int hl, output int hh);
    int a = at(src, w, 2*bx, 2*by), b = at(src, w, 2*bx+1, 2*by);
    int c = at(src, w, 2*bx, 2*by+1), d = at(src, w, 2*bx+1, 2*by+1);
    ll = a + b + c + d;
    lh = (a + c) - (b + d);
    hl = (a + b) - (c + d);
    hh = (a + d) - (b + c);
  endfunction
endpackage

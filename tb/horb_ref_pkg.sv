// horb_ref_pkg: untimed reference model of the HORB motion search, used by
// the testbenches to work out the expected result of a macroblock
// independently of the RTL.
//
// It evaluates the same rules as the processor: the no-motion test on the
// 5 MSBs with a 70% threshold; 25 regions of 7x7 vectors (centres at
// multiples of 7) visited centre first, then the ring of 8 and the ring of 16,
// each ring clockwise from the region nearest to the best vector; partial SAD
// test psad*8 > SADav*(n+5) after every line; stop test best*5 < SADav*(10-g)
// after every region; vectors outside [-16,15] or the frame skipped. It also
// counts the SAD_lines computed. It provides a frame generator too.
package horb_ref_pkg;

  typedef struct {
    int mv_h, mv_k, sad;
    bit sad_valid, stationary;
    int regions, active_lines, kills, groups_reached;
    bit masked;  // some vector of a searched region was outside range/frame
  } ref_res_t;

  function automatic int ring_a(int g, int e);
    if (g == 2) return (e <= 2) ? -1 : (e == 3 || e == 7) ? 0 : 1;
    if (e <= 4) return -2;
    if (e == 5 || e == 15) return -1;
    if (e == 6 || e == 14) return 0;
    if (e == 7 || e == 13) return 1;
    return 2;
  endfunction

  function automatic int ring_b(int g, int e);
    if (g == 2) return (e == 0 || e == 6 || e == 7) ? -1 : (e == 1 || e == 5) ? 0 : 1;
    if (e == 0 || e >= 12) return -2;
    if (e == 1 || e == 11) return -1;
    if (e == 2 || e == 10) return 0;
    if (e == 3 || e == 9) return 1;
    return 2;
  endfunction

  function automatic int nearest(int g, int h, int k);
    int bd = 1 << 30, be = 0, n = (g == 2) ? 8 : 16;
    for (int e = 0; e < n; e++) begin
      int dh = h - 7 * ring_a(g, e), dk = k - 7 * ring_b(g, e);
      if (dh * dh + dk * dk < bd) begin bd = dh * dh + dk * dk; be = e; end
    end
    return be;
  endfunction

  function automatic int px(const ref byte unsigned f[], input int W, H, y, x);
    if (y < 0) y = 0; if (y > H - 1) y = H - 1;
    if (x < 0) x = 0; if (x > W - 1) x = W - 1;
    return int'(f[y * W + x]);
  endfunction

  function automatic ref_res_t model(const ref byte unsigned cur[], const ref byte unsigned prev[],
                                     input int W, H, mbr, mbc, bit fs, bit have_avg, int sadav);
    ref_res_t r;
    int y0 = mbr * 16, x0 = mbc * 16, cnt = 0;
    bit crit = !fs && have_avg;
    int best = -1, bh = 0, bk = 0;
    int g, e0;
    r = '{default: 0};
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if ((px(cur, W, H, y0 + i, x0 + j) >> 3) == (px(prev, W, H, y0 + i, x0 + j) >> 3)) cnt++;
    if (cnt * 100 > 70 * 256) begin
      r.stationary = 1;
      return r;
    end
    for (int reg_i = 0; reg_i < 25; reg_i++) begin
      int a, b, hc, kc;
      if (reg_i == 0) begin g = 1; a = 0; b = 0; end
      else if (reg_i < 9) begin
        if (reg_i == 1) begin g = 2; e0 = nearest(2, bh, bk); end
        a = ring_a(2, (e0 + reg_i - 1) % 8); b = ring_b(2, (e0 + reg_i - 1) % 8);
      end else begin
        if (reg_i == 9) begin g = 3; e0 = nearest(3, bh, bk); end
        a = ring_a(3, (e0 + reg_i - 9) % 16); b = ring_b(3, (e0 + reg_i - 9) % 16);
      end
      r.groups_reached = g;
      hc = 7 * a; kc = 7 * b;
      r.regions++;
      for (int hh = 0; hh < 7; hh++)
        for (int kk = 0; kk < 7; kk++) begin
          int h = hc - 3 + hh, k = kc - 3 + kk, ps = 0;
          bit killed = 0;
          if (h < -16 || h > 15 || k < -16 || k > 15 || y0 + h < 0 || y0 + h + 15 > H - 1 ||
              x0 + k < 0 || x0 + k + 15 > W - 1) begin
            r.masked = 1;
            continue;
          end
          for (int n = 1; n <= 16 && !killed; n++) begin
            for (int j = 0; j < 16; j++) begin
              int d = px(cur, W, H, y0 + n - 1, x0 + j) - px(prev, W, H, y0 + n - 1 + h, x0 + j + k);
              ps += (d < 0) ? -d : d;
            end
            r.active_lines++;
            if (crit && ps * 8 > sadav * (n + 5)) begin killed = 1; r.kills++; end
          end
          if (!killed && (best < 0 || ps < best)) begin best = ps; bh = h; bk = k; end
        end
      if (crit && best >= 0 && best * 5 < sadav * (10 - g)) break;
    end
    r.sad_valid = (best >= 0);
    r.sad = (best >= 0) ? best : 0;
    r.mv_h = (best >= 0) ? bh : 0;
    r.mv_k = (best >= 0) ? bk : 0;
    return r;
  endfunction

  // pseudo-random texture value at (y, x), seeded
  function automatic byte unsigned tex(int seed, int y, int x);
    int unsigned v = 32'(seed) * 32'h9E3779B1 ^ 32'(y) * 32'h85EBCA77 ^ 32'(x) * 32'hC2B2AE3D;
    v = v ^ (v >> 15); v = v * 32'h2C1B3C6D; v = v ^ (v >> 12);
    return byte'(v);
  endfunction

  // Previous frame: random texture. Current frame: each macroblock is the
  // previous frame moved by its motion vector mv_h/mv_k, plus noise of +-noise.
  function automatic void make_frames(ref byte unsigned cur[], ref byte unsigned prev[],
                                      input int W, H, seed, const ref int mvh[], const ref int mvk[],
                                      input int noise);
    int nmb = W / 16;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) prev[y * W + x] = tex(seed, y, x);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int m = (y / 16) * nmb + (x / 16);
        int v = px(prev, W, H, y + mvh[m % mvh.size()], x + mvk[m % mvk.size()]);
        int nz = int'(tex(seed + 7, y, x)) % (2 * noise + 1) - noise;
        v += nz;
        if (v < 0) v = 0; if (v > 255) v = 255;
        cur[y * W + x] = byte'(v);
      end
  endfunction

  // Smooth texture: bilinear interpolation of random values on a 4-pixel
  // grid, plus a little fine detail. Closer to natural images than white noise.
  function automatic int smooth(int seed, int y, int x);
    int gy = (y >>> 2), gx = (x >>> 2), fy = y & 3, fx = x & 3;
    int a = int'(tex(seed, gy, gx)), b = int'(tex(seed, gy, gx + 1));
    int c = int'(tex(seed, gy + 1, gx)), d = int'(tex(seed, gy + 1, gx + 1));
    int v = ((a * (4 - fx) + b * fx) * (4 - fy) + (c * (4 - fx) + d * fx) * fy) / 16;
    return (v * 7 + (int'(tex(seed + 3, y, x)) & 31)) / 8;
  endfunction

  // Frame f of a synthetic sequence: a background panning by (bvy, bvx) per
  // frame and a 48x48 object moving by (ovy, ovx) per frame, plus +-1 noise.
  function automatic void make_scene(ref byte unsigned fr[], input int W, H, f, bvy, bvx, ovy, ovx);
    int oy = 40 + f * ovy, ox = 60 + f * ovx;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (y >= oy && y < oy + 48 && x >= ox && x < ox + 48) v = smooth(11, y - oy, x - ox);
        else v = smooth(5, y + 64 - f * bvy, x + 64 - f * bvx);
        v += int'(tex(100 + f, y, x)) % 3 - 1;
        fr[y * W + x] = byte'(v < 0 ? 0 : v > 255 ? 255 : v);
      end
  endfunction

endpackage

// harva_ref_pkg: behavioural reference of the HOG+SVM computation, written
// from the arithmetic definitions and independent of the RTL structure.
// It holds a test image and a set of quantised coefficients, computes every
// feature value of the image and the SVM decision.
//
//   Gx = P(x+1,y) - P(x-1,y), Gy = P(x,y+1) - P(x,y-1), P clamped to the image
//   mag = floor(sqrt((Gx^2 + Gy^2) * 2^16))
//   bin: first k in 0..3 with |Gy|*256 < tan_k+1*|Gx|, else 4; mirrored to
//        8-k when Gx and Gy are non-zero with opposite signs
//   block (bx,by) every 8 pixels, 16x16, cell = (y>=8)*2 + (x>=8)
//   norm = min(65535, (v * floor(2^40 / (sum + min))) >> 24)
//   score = sum(q_i*step*x_i) + bias*2^16, label = score >= 0
package harva_ref_pkg;

  localparam int MAXW = 128;
  localparam int MAXH = 128;
  localparam int MAXF = 36 * (MAXW / 8) * (MAXH / 8);

  int unsigned img_w, img_h;
  logic [7:0]  img [MAXH][MAXW];
  logic [7:0]  coef [MAXF];
  int unsigned feat [MAXF];
  int unsigned n_feat;

  function automatic int unsigned pix(int x, int y);
    if (x < 0) x = 0;
    if (x >= int'(img_w)) x = int'(img_w) - 1;
    if (y < 0) y = 0;
    if (y >= int'(img_h)) y = int'(img_h) - 1;
    return int'(img[y][x]);
  endfunction

  function automatic longint unsigned ref_isqrt(longint unsigned v);
    longint unsigned r;
    r = 0;
    for (int b = 20; b >= 0; b--) begin
      longint unsigned t;
      t = r | (64'd1 << b);
      if (t * t <= v) r = t;
    end
    return r;
  endfunction

  function automatic int ref_bin(int gx, int gy);
    int tanv[5] = '{0, 93, 215, 443, 1452};
    int ax, ay, k;
    ax = (gx < 0) ? -gx : gx;
    ay = (gy < 0) ? -gy : gy;
    k = 4;
    for (int i = 0; i < 4; i++) begin
      if (ay * 256 < tanv[i+1] * ax) begin
        k = i;
        break;
      end
    end
    if (gx != 0 && gy != 0 && ((gx < 0) != (gy < 0))) return 8 - k;
    return k;
  endfunction

  function automatic int unsigned ref_mag(int gx, int gy);
    return int'(ref_isqrt(longint'(gx*gx + gy*gy) << 16));
  endfunction

  // Histogram of the block with origin (bx, by).
  function automatic void block_hist(int bx, int by, output int unsigned h[36]);
    foreach (h[i]) h[i] = 0;
    for (int r = 0; r < 16; r++) begin
      for (int x = 0; x < 16; x++) begin
        int gx, gy, X, Y, cl;
        X = bx + x;
        Y = by + r;
        gx = pix(X + 1, Y) - pix(X - 1, Y);
        gy = pix(X, Y + 1) - pix(X, Y - 1);
        cl = (r >= 8 ? 2 : 0) + (x >= 8 ? 1 : 0);
        h[cl*9 + ref_bin(gx, gy)] += ref_mag(gx, gy);
      end
    end
  endfunction

  function automatic void norm_hist(input int unsigned h[36], output int unsigned o[36]);
    longint unsigned s, mn, rcp, p;
    s = 0;
    mn = 64'hFFFF_FFFF;
    foreach (h[i]) begin
      s += h[i];
      if (h[i] < mn) mn = h[i];
    end
    s += mn;
    rcp = (s == 0) ? 0 : (64'd1 << 40) / s;
    foreach (h[i]) begin
      p = (longint'(h[i]) * rcp) >> 24;
      o[i] = (p > 65535) ? 65535 : int'(p);
    end
  endfunction

  // Fills feat[] for the whole image, block order raster with stride 8.
  function automatic void compute_features();
    int unsigned h[36], o[36];
    n_feat = 0;
    for (int bj = 0; bj < int'(img_h) / 8; bj++)
      for (int bi = 0; bi < int'(img_w) / 8; bi++) begin
        block_hist(bi * 8, bj * 8, h);
        norm_hist(h, o);
        for (int i = 0; i < 36; i++) feat[n_feat + i] = o[i];
        n_feat += 36;
      end
  endfunction

  // Decision value with bias b (16 fraction bits) and step (16 fraction bits).
  function automatic longint ref_score(int unsigned step, int b);
    longint acc;
    acc = 0;
    for (int i = 0; i < int'(n_feat); i++)
      acc += longint'($signed(coef[i])) * longint'(step) * longint'(feat[i]);
    return acc + (longint'(b) <<< 16);
  endfunction

  // Fills the image with a mix of ramps, edges and noise.
  function automatic void make_image(int unsigned w, int unsigned h);
    img_w = w;
    img_h = h;
    for (int y = 0; y < int'(h); y++)
      for (int x = 0; x < int'(w); x++) begin
        int v;
        v = (x * 5 + y * 3) % 200;
        if (((x / 12) + (y / 20)) % 2 == 1) v = 255 - v;
        v += int'($urandom % 24);
        img[y][x] = 8'(v);
      end
  endfunction

  function automatic void make_coefs(int unsigned n);
    for (int i = 0; i < int'(n); i++) coef[i] = 8'($urandom);
  endfunction

  // Pixel word (t, c) of the tile of block n.
  function automatic logic [31:0] tile_word(int n, int t, int c);
    int bi, bj, x, y;
    logic [31:0] w;
    bi = n % (int'(img_w) / 8);
    bj = n / (int'(img_w) / 8);
    y = bj * 8 - 1 + t;
    x = bi * 8 - 4 + 4 * c;
    if (y < 0 || y >= int'(img_h) || x < 0 || x >= int'(img_w)) return $urandom;
    for (int i = 0; i < 4; i++) w[8*i +: 8] = img[y][x + i];
    return w;
  endfunction

endpackage

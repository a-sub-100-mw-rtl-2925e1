// tb_hog_ref_pkg: floating-point reference of the HOG feature pipeline and of
// SVM window scoring, used by the core and system testbenches.
//
// hog_ref() computes, from the gray image img (W x H, row-major), the
// gradient by central differences with edge clamping, the magnitude (scaled
// by the CORDIC gain 1.64676) and unsigned orientation, the cell histograms
// with the 0.75/0.25 orientation vote split in the outer quarters of a bin,
// and the L2-Hys normalised block features (clip 0.2) scaled by 256.
// window_score() adds up the dot products of a window's blocks with the
// coefficients a core holds, using the MAC-to-block mapping of each window
// shape.
package tb_hog_ref_pkg;
  import hog_pkg::*;

  int W, H;
  int img [];                 // y*W + x
  real feat [];               // ((by*BW + bx)*4 + lane)*9 + bin

  function automatic int bwid(); return W / 8 - 1; endfunction
  function automatic int bhgt(); return H / 8 - 1; endfunction
  function automatic int fidx(int bx, int by, int l, int g);
    return ((by * bwid() + bx) * 4 + l) * 9 + g;
  endfunction

  function automatic int px(int x, int y);
    if (x < 0) x = 0;
    if (x > W - 1) x = W - 1;
    if (y < 0) y = 0;
    if (y > H - 1) y = H - 1;
    return img[y * W + x];
  endfunction

  function automatic void hog_ref();
    real hist [];
    int cw, ch;
    cw = W / 8;
    ch = H / 8;
    hist = new[cw * ch * 9];
    foreach (hist[i]) hist[i] = 0.0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        real gx, gy, m, a, fr;
        int b, c;
        gx = real'(px(x + 1, y) - px(x - 1, y));
        gy = real'(px(x, y + 1) - px(x, y - 1));
        m = $sqrt(gx * gx + gy * gy) * 1.646760258;
        a = $atan2(gy, gx) * 180.0 / 3.14159265358979;
        if (a < 0.0) a += 180.0;
        if (a >= 180.0) a -= 180.0;
        a = a * 12.8;
        b = int'($floor(a / 256.0));
        if (b > 8) b = 8;
        fr = a - real'(b) * 256.0;
        c = ((y / 8) * cw + (x / 8)) * 9;
        if (fr < 64.0) begin
          hist[c + b] += 0.75 * m; hist[c + (b + 8) % 9] += 0.25 * m;
        end else if (fr >= 192.0) begin
          hist[c + b] += 0.75 * m; hist[c + (b + 1) % 9] += 0.25 * m;
        end else hist[c + b] += m;
      end
    feat = new[bwid() * bhgt() * 36];
    for (int by = 0; by < bhgt(); by++)
      for (int bx = 0; bx < bwid(); bx++) begin
        real v [4][9];
        real s;
        for (int l = 0; l < 4; l++)
          for (int g = 0; g < 9; g++)
            v[l][g] = hist[((by + l / 2) * cw + bx + l % 2) * 9 + g];
        s = 0.0;
        foreach (v[l, g]) s += v[l][g] * v[l][g];
        if (s > 0.0) begin
          foreach (v[l, g]) begin
            v[l][g] = v[l][g] / $sqrt(s);
            if (v[l][g] > 0.2) v[l][g] = 0.2;
          end
          s = 0.0;
          foreach (v[l, g]) s += v[l][g] * v[l][g];
          foreach (v[l, g]) begin
            v[l][g] = v[l][g] / $sqrt(s) * 256.0;
            if (v[l][g] > 255.0) v[l][g] = 255.0;
          end
        end
        foreach (v[l, g]) feat[fidx(bx, by, l, g)] = v[l][g];
      end
  endfunction

  // coefficient store of the two cores: [core][mac][bin][lane]
  int coef [2][120][9][4];

  // physical MAC serving block (r, c) of a window; core 1 for the lower part
  // of a square window
  function automatic void mac_of(input int shape, input int r, input int c,
                                 output int core, output int mac);
    if (shape == 0)      begin core = 0; mac = r * 8 + c; end      // vertically long
    else if (shape == 1) begin core = 0; mac = c * 8 + r; end      // horizontally long
    else if (r < 8)      begin core = 0; mac = c * 8 + r; end      // square, upper part
    else                 begin core = 1; mac = c * 8 + (r - 8); end
  endfunction

  // dot product of captured integer features with a window's coefficients;
  // core_sel picks the coefficient set for non-square shapes.  Early
  // classification: stops after row g when the sum leaves [rej[g], det[g]].
  function automatic longint window_score(input int shape, input int core_sel,
      input int wx, input int wy, ref int cap [], input int bw,
      input bit een, ref longint tdet [14], ref longint trej [14],
      output bit early, output bit dec);
    int mw, kh;
    longint s;
    mw = (shape == 0) ? 7 : 15;
    kh = (shape == 1) ? 7 : 15;
    s = 0; early = 0; dec = 0;
    for (int r = 0; r < kh; r++) begin
      for (int c = 0; c < mw; c++) begin
        int core, mac;
        mac_of(shape, r, c, core, mac);
        if (shape != 2) core = core_sel;
        for (int g = 0; g < 9; g++)
          for (int l = 0; l < 4; l++)
            s += longint'(cap[(((wy + r) * bw + wx + c) * 4 + l) * 9 + g]) * coef[core][mac][g][l];
      end
      if (een && r < kh - 1 && (s > tdet[r] || s < trej[r])) begin
        early = 1; dec = (s > tdet[r]);
        return s;
      end
    end
    return s;
  endfunction

endpackage

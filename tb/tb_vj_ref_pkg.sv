// tb_vj_ref_pkg: reference model of the window evaluation, for testbenches.
//
// Holds a grey image, its integral image and squared integral image (built
// here by plain loops), and a cascade of Haar-like classifier stages in the
// accelerator's shared-memory format. eval_window() computes, with ordinary
// integer and real arithmetic, the face / no-face decision and the last
// stage evaluated for a window, so the hardware's result can be checked.
// Scaled coordinates are round(c * scale) with real arithmetic; the variance
// uses W*H*S2 - S1^2 and an integer square root refined from $sqrt.
package tb_vj_ref_pkg;

  localparam int unsigned SUM_BASE = 32'h4000_0000;  // integral image (32-bit entries)
  localparam int unsigned SQ_BASE  = 32'h4100_0000;  // squared integral (64-bit entries)

  int img_w, img_h;
  byte unsigned pix[];
  longint unsigned ii[];     // (img_w+1) x (img_h+1), zero first row and column
  longint unsigned sq[];

  // classifier
  int n_stages;
  int stage_nf[];
  int stage_thr[];
  int unsigned feat_rect[][3];
  int feat_thr[];
  int feat_w1[];
  int feat_w2[];
  int stage_first[];         // index of a stage's first feature

  function automatic void make_image(int w, int h, int seed_mode);
    img_w = w; img_h = h;
    pix = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        // smooth pattern plus noise, so features see structure
        pix[y*w+x] = 8'(((x * 7 + y * 3 + seed_mode) % 97) * 2 + ($urandom % 60));
    ii = new[(w+1)*(h+1)];
    sq = new[(w+1)*(h+1)];
    for (int i = 0; i < (w+1)*(h+1); i++) begin ii[i] = 0; sq[i] = 0; end
    for (int y = 1; y <= h; y++) begin
      automatic longint unsigned rs = 0, rq = 0;
      for (int x = 1; x <= w; x++) begin
        rs += pix[(y-1)*w + x-1];
        rq += longint'(pix[(y-1)*w + x-1]) * pix[(y-1)*w + x-1];
        ii[y*(w+1)+x] = ii[(y-1)*(w+1)+x] + rs;
        sq[y*(w+1)+x] = sq[(y-1)*(w+1)+x] + rq;
      end
    end
  endfunction

  // word of system memory as the AHB master reads it; ok=0 outside the images
  function automatic logic [31:0] mem_word(logic [31:0] a, output bit ok);
    automatic longint unsigned n = (img_w+1)*(img_h+1);
    ok = 1;
    if (a >= SUM_BASE && a < SUM_BASE + 4*n) return ii[(a - SUM_BASE) >> 2][31:0];
    if (a >= SQ_BASE && a < SQ_BASE + 8*n) begin
      automatic longint unsigned v = sq[(a - SQ_BASE) >> 3];
      return a[2] ? v[31:0] : v[63:32];
    end
    ok = 0;
    return 32'hDEAD_BEEF;
  endfunction

  function automatic int unsigned pack_rect(int wt, int x, int y, int w, int h);
    return {8'(wt), 6'(x), 6'(y), 6'(w), 6'(h)};
  endfunction

  // random classifier on a 20x20 base window
  function automatic void make_classifier(int ns, int nf_per_stage[]);
    automatic int total = 0, k = 0;
    n_stages = ns;
    stage_nf = new[ns]; stage_thr = new[ns]; stage_first = new[ns];
    foreach (nf_per_stage[s]) total += nf_per_stage[s];
    feat_rect = new[total]; feat_thr = new[total]; feat_w1 = new[total]; feat_w2 = new[total];
    for (int s = 0; s < ns; s++) begin
      stage_nf[s] = nf_per_stage[s];
      stage_first[s] = k;
      stage_thr[s] = 0;
      for (int f = 0; f < nf_per_stage[s]; f++) begin
        automatic int x = $urandom % 14, y = $urandom % 14;
        automatic int w = 2 + $urandom % (19 - x), h = 2 + $urandom % (19 - y);
        automatic int nr = 2 + $urandom % 2;
        feat_rect[k][0] = pack_rect(-1, x, y, w, h);
        feat_rect[k][1] = pack_rect(2, x, y, (w+1)/2, h);
        feat_rect[k][2] = (nr == 3) ? pack_rect(3, x, y + h/2, w, h - h/2) : 0;
        if ($urandom % 4 == 0) feat_rect[k][1] = 0;  // one-rectangle feature
        feat_thr[k] = int'($urandom % 1200) - 600;
        feat_w1[k]  = -int'($urandom % 3000) - 100;
        feat_w2[k]  = int'($urandom % 3000) + 100;
        k++;
      end
    end
  endfunction

  // shared-memory image of the classifier (32-bit words)
  function automatic void serialize(ref int unsigned words[$]);
    words.delete();
    for (int s = 0; s < n_stages; s++) begin
      words.push_back(stage_nf[s]);
      words.push_back(stage_thr[s]);
      for (int f = stage_first[s]; f < stage_first[s] + stage_nf[s]; f++) begin
        words.push_back(feat_rect[f][0]);
        words.push_back(feat_rect[f][1]);
        words.push_back(feat_rect[f][2]);
        words.push_back(feat_thr[f]);
        words.push_back(feat_w1[f]);
        words.push_back(feat_w2[f]);
      end
    end
  endfunction

  function automatic longint rect_sum(bit sqr, int x, int y, int w, int h);
    automatic int s = img_w + 1;
    if (sqr) return sq[(y+h)*s + x+w] + sq[y*s + x] - sq[y*s + x+w] - sq[(y+h)*s + x];
    return ii[(y+h)*s + x+w] + ii[y*s + x] - ii[y*s + x+w] - ii[(y+h)*s + x];
  endfunction

  function automatic int scl(int c, int unsigned scale);
    return int'($floor(real'(c) * real'(scale) / 65536.0 + 0.5));
  endfunction

  function automatic longint unsigned isqrt(longint unsigned v);
    automatic longint unsigned r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint sigma_adj(int wx, int wy, int ww, int wh);
    automatic longint s1 = rect_sum(0, wx, wy, ww, wh);
    automatic longint s2 = rect_sum(1, wx, wy, ww, wh);
    automatic longint v  = longint'(ww) * wh * s2 - s1 * s1;
    longint r;
    if (v < 0) v = 0;
    r = isqrt(v);
    return (r == 0) ? 1 : r;
  endfunction

  // stage sum of stage s for a window
  function automatic longint stage_sum(int s, int unsigned scale, int wx, int wy, longint sig);
    automatic longint acc = 0;
    for (int f = stage_first[s]; f < stage_first[s] + stage_nf[s]; f++) begin
      automatic longint fs = 0, tn;
      for (int r = 0; r < 3; r++) begin
        automatic int unsigned wd = feat_rect[f][r];
        automatic int wt = int'($signed(wd[31:24]));
        if (wt != 0) begin
          automatic int x = scl(wd[23:18], scale), y = scl(wd[17:12], scale);
          automatic int w = scl(wd[11:6], scale),  h = scl(wd[5:0], scale);
          fs += longint'(wt) * rect_sum(0, wx + x, wy + y, w, h);
        end
      end
      tn = (sig * feat_thr[f]) >>> 12;
      acc += (fs >= tn) ? feat_w2[f] : feat_w1[f];
    end
    return acc;
  endfunction

  // full decision; returns face, sets last stage evaluated
  function automatic bit eval_window(int unsigned scale, int wx, int wy, int ww, int wh,
                                     int s0, int s1, output int last);
    automatic longint sig = sigma_adj(wx, wy, ww, wh);
    for (int s = s0; s <= s1; s++) begin
      last = s;
      if (stage_sum(s, scale, wx, wy, sig) < stage_thr[s]) return 0;
    end
    return 1;
  endfunction

  // set thresholds so that the given window passes every stage by a margin
  function automatic void tune_for(int unsigned scale, int wx, int wy, int ww, int wh, int margin);
    automatic longint sig = sigma_adj(wx, wy, ww, wh);
    for (int s = 0; s < n_stages; s++)
      stage_thr[s] = int'(stage_sum(s, scale, wx, wy, sig)) - margin;
  endfunction

endpackage

// fd_ref_pkg: reference model of the face detection datapath for testbenches.
//
// Works straight from pixels, not from integral images: rectangle sums are
// summed pixel by pixel, the window variance is formed from direct sums and
// its square root found by binary search. It also builds pseudo-random
// cascades (balanced two- and three-rectangle features) and images with
// flat, noisy and graded regions, so that windows are rejected at every
// stage and some pass the whole cascade.
package fd_ref_pkg;
  import fd_pkg::*;

  int unsigned img [];          // pixels, row-major
  int          img_w, img_h;

  localparam int unsigned RG = 256;        // max groups held by the model
  localparam int unsigned RL = 8;          // max lanes
  localparam int unsigned RS = 32;         // max stages
  weak_t  ref_weak  [RL][RG];
  stage_t ref_stage [RS];
  int     ref_nstages;
  int     ref_par;
  int     ref_ngroups;

  function automatic int unsigned px(int x, int y);
    return img[y * img_w + x];
  endfunction

  function automatic longint unsigned isqrt(longint unsigned v);
    longint unsigned lo, hi, mid;
    lo = 0; hi = 64'd262144;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  function automatic longint window_sum(int wx, int wy);
    longint s = 0;
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) s += px(wx + x, wy + y);
    return s;
  endfunction

  function automatic longint window_sqsum(int wx, int wy);
    longint s = 0;
    for (int y = 0; y < WIN; y++) for (int x = 0; x < WIN; x++) s += px(wx + x, wy + y) * px(wx + x, wy + y);
    return s;
  endfunction

  function automatic longint unsigned window_std(int wx, int wy);
    longint s, q;
    s = window_sum(wx, wy);
    q = window_sqsum(wx, wy);
    return isqrt(longint'(AREA) * q - s * s);
  endfunction

  function automatic longint rect_sum(int wx, int wy, rect_t r);
    longint s = 0;
    for (int y = 0; y < int'(r.h); y++)
      for (int x = 0; x < int'(r.w); x++) s += px(wx + int'(r.x) + x, wy + int'(r.y) + y);
    return s;
  endfunction

  // vote of one weak classifier on window (wx,wy) with factor sd
  function automatic int weak_vote(int wx, int wy, longint sd, weak_t w, output bit left);
    longint f = 0;
    for (int i = 0; i < NRECT; i++) f += longint'(w.rect[i].weight) * rect_sum(wx, wy, w.rect[i]);
    left = f < longint'(w.thr) * sd;
    return left ? int'(w.left) : int'(w.right);
  endfunction

  // number of stages window (wx,wy) passes; face when it equals ref_nstages
  function automatic int cascade_stages(int wx, int wy, longint sd);
    for (int s = 0; s < ref_nstages; s++) begin
      longint acc = 0;
      for (int g = 0; g < int'(ref_stage[s].ngroups); g++)
        for (int l = 0; l < ref_par; l++) begin
          bit lf;
          acc += weak_vote(wx, wy, sd, ref_weak[l][int'(ref_stage[s].first) + g], lf);
        end
      if (acc < longint'(ref_stage[s].thr)) return s;
    end
    return ref_nstages;
  endfunction

  function automatic rect_t rand_rect(bit three, output rect_t r2, output rect_t r3);
    rect_t r;
    r.x = CRD_W'($urandom_range(0, WIN - 4));
    r.y = CRD_W'($urandom_range(0, WIN - 4));
    r.w = CRD_W'($urandom_range(2, WIN - int'(r.x)) & ~32'(three ? 0 : 1));
    if (r.w < 2) r.w = 2;
    if (three) r.w = CRD_W'((int'(r.w) / 3) * 3 == 0 ? 3 : (int'(r.w) / 3) * 3);
    if (int'(r.x) + int'(r.w) > WIN) r.x = CRD_W'(WIN - int'(r.w));
    r.h = CRD_W'($urandom_range(2, WIN - int'(r.y)));
    r.weight = -16'sd4096;
    r2 = r;
    r3 = '0;
    if ($urandom_range(0, 1) == 1) begin  // left/right halves
      r2.w = three ? CRD_W'(int'(r.w) / 3) : CRD_W'(int'(r.w) / 2);
      if (three) r2.x = r.x + r2.w;
    end else begin
      r2.h = CRD_W'(int'(r.h) / 2);
      if (r2.h == 0) r2.h = 1;
    end
    r2.weight = three ? 16'sd12288 : 16'sd8192;
    return r;
  endfunction

  function automatic weak_t rand_weak();
    weak_t w;
    rect_t r2, r3;
    w.rect[0] = rand_rect($urandom_range(0, 2) == 0, r2, r3);
    w.rect[1] = r2;
    w.rect[2] = r3;
    w.thr   = FX_W'($signed($urandom_range(0, 200)) - 100);
    w.left  = FX_W'($signed($urandom_range(400, 4096)));
    w.right = FX_W'(-$signed($urandom_range(400, 4096)));
    if ($urandom_range(0, 1) == 1) begin
      w.left  = -w.left;
      w.right = -w.right;
    end
    return w;
  endfunction

  // nst stages of gps groups each; stage thresholds slightly below zero so
  // that roughly half the windows go on at each stage
  function automatic void gen_cascade(int par, int nst, int gps);
    ref_par = par;
    ref_nstages = nst;
    ref_ngroups = 0;
    for (int s = 0; s < nst; s++) begin
      ref_stage[s].first   = 16'(ref_ngroups);
      ref_stage[s].ngroups = 16'(gps + (s % 2));
      ref_stage[s].thr     = 20'(-$signed($urandom_range(1500, 5500)));
      for (int g = 0; g < gps + (s % 2); g++) begin
        for (int l = 0; l < par; l++) ref_weak[l][ref_ngroups] = rand_weak();
        ref_ngroups++;
      end
    end
  endfunction

  // vote sum of stage s on window (wx,wy)
  function automatic longint stage_acc(int s, int wx, int wy, longint sd);
    longint acc = 0;
    for (int g = 0; g < int'(ref_stage[s].ngroups); g++)
      for (int l = 0; l < ref_par; l++) begin
        bit lf;
        acc += weak_vote(wx, wy, sd, ref_weak[l][int'(ref_stage[s].first) + g], lf);
      end
    return acc;
  endfunction

  // sets each stage threshold so that about `keep_pct` percent of the
  // sampled windows that reach the stage go on (needs the image)
  function automatic void tune_cascade(int samples, int keep_pct);
    int sx [], sy [];
    longint sd [];
    bit alive [];
    sx = new[samples]; sy = new[samples]; sd = new[samples]; alive = new[samples];
    for (int i = 0; i < samples; i++) begin
      sx[i] = $urandom_range(0, img_w - WIN);
      sy[i] = $urandom_range(0, img_h - WIN);
      sd[i] = longint'(window_std(sx[i], sy[i]));
      alive[i] = 1;
    end
    for (int s = 0; s < ref_nstages; s++) begin
      longint a [$];
      a.delete();
      for (int i = 0; i < samples; i++) begin
        if (alive[i]) a.push_back(stage_acc(s, sx[i], sy[i], sd[i]));
      end
      a.sort();
      if (a.size() > 0) ref_stage[s].thr = 20'(a[(a.size() * (100 - keep_pct)) / 100]);
      for (int i = 0; i < samples; i++)
        if (alive[i] && stage_acc(s, sx[i], sy[i], sd[i]) < longint'(ref_stage[s].thr)) alive[i] = 0;
    end
  endfunction

  // image: noise over a gradient, with a flat block and a bright square
  function automatic void gen_image(int w, int h);
    img_w = w;
    img_h = h;
    img = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v;
        v = (x * 3 + y * 2) % 200 + int'($urandom_range(0, 55));
        if (x < 30 && y < 28) v = 90;                        // flat: sigma 0
        if (x > w / 2 && x < w / 2 + 16 && y > h / 2 && y < h / 2 + 16) v = 250;
        img[y * w + x] = 32'(v);
      end
  endfunction
endpackage

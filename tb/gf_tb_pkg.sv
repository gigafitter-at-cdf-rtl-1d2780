// gf_tb_pkg: reference model and stimulus helpers shared by the GigaFitter
// testbenches.
//
// It generates roads (SVX hits per layer, XFT tracks, road identifier),
// turns them into SVT cable words, and predicts, independently of the RTL,
// the words a track processor must send for them: every hit combination in
// odometer order (layer 0 changing fastest, XFT slowest), the five
// leave-one-layer-out fits of a 5/5 combination, the exact scalar products
// with the output shift and saturation, the chi2 cut, the goodness
// q = chi2 + penalty * long clusters, the best-of-sequence choice and the
// 7-word packet layout. Fit constants and the condition-to-set map are
// pseudo-random functions of the set index and condition, so a testbench
// can load and predict them without any data file.
package gf_tb_pkg;
  import gf_pkg::*;

  localparam int MAXH = 5;   // hit slots per layer (generated roads use up to 3)
  localparam int MAXX = 2;   // XFT tracks per road
  localparam int RSHIFT = 15;

  typedef struct {
    int          nh [N_SVX];
    hit_t        h  [N_SVX][MAXH];
    int          nx;
    xft_t        x  [MAXX];
    logic [20:0] road;
  } road_t;

  typedef struct {
    logic        ee;
    logic        ep;
    logic [20:0] data;
  } word_t;

  // ---------------- pseudo-random constants ----------------
  function automatic logic [31:0] mix(input logic [31:0] a);
    logic [31:0] h;
    h = a * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Constant-set index stored at a condition address.
  function automatic logic [7:0] cond_map(input logic [12:0] cond);
    return mix({19'd0, cond} + 32'd77)[7:0];
  endfunction

  // Coefficient t (0..5) or constant term (t = 6) of scalar product n.
  // Track parameters use wide coefficients, chi components small ones;
  // sets 250..255 use full-scale chi coefficients so their fits overflow.
  function automatic logic signed [17:0] coef(input int set, input int n, input int t);
    logic [31:0] r;
    int v;
    r = mix(set * 64 + n * 8 + t + 1000);
    if (n < 3)       v = int'(r[13:0]) - 8192;         // +-2^13
    else if (set >= 250) v = int'(r[17:0]) - 131072;   // full scale
    else             v = int'(r[9:0]) - 512;           // +-2^9
    if (t == 6) v = (n < 3) ? int'(r[11:0]) - 2048 : int'(r[6:0]) - 64;
    return 18'(v);
  endfunction

  function automatic logic [CSET_W-1:0] cset(input int set);
    logic [N_PAR-1:0][N_FIT:0][COEF_W-1:0] c;
    for (int n = 0; n < N_PAR; n++)
      for (int t = 0; t <= N_FIT; t++) c[n][t] = coef(set, n, t);
    return c;
  endfunction

  // ---------------- reference fit ----------------
  typedef struct {
    longint p [N_PAR];
    logic   ovf;
    longint chi2;
  } fitref_t;

  function automatic fitref_t fit(input int set, input logic [14:0] x [N_FIT]);
    fitref_t r;
    r.ovf = 0;
    for (int n = 0; n < N_PAR; n++) begin
      longint acc, v;
      acc = longint'(coef(set, n, 6)) <<< RSHIFT;
      for (int t = 0; t < N_FIT; t++) acc += longint'(coef(set, n, t)) * longint'(x[t]);
      v = acc >>> RSHIFT;
      if (v > 131071)       begin v = 131071;  r.ovf = 1; end
      else if (v < -131072) begin v = -131072; r.ovf = 1; end
      r.p[n] = v;
    end
    r.chi2 = r.p[3] * r.p[3] + r.p[4] * r.p[4] + r.p[5] * r.p[5];
    return r;
  endfunction

  // ---------------- road generation ----------------
  // kind: 0 random 4/5 or 5/5, 4 force 4/5, 5 force 5/5, 3 a 3/5 road.
  // hi_set: pick zeta values that map to overflow sets more often (unused
  // when 0).
  function automatic road_t gen_road(input int kind, input logic [20:0] id);
    road_t r;
    int miss;
    miss = $urandom_range(0, 4);
    for (int l = 0; l < N_SVX; l++) begin
      r.nh[l] = $urandom_range(1, 3);
      if (kind == 4 && l == miss) r.nh[l] = 0;
      if (kind == 0 && l == miss && $urandom_range(0, 1) == 1) r.nh[l] = 0;
      if (kind == 3 && (l == miss || l == (miss + 1) % 5)) r.nh[l] = 0;
      for (int k = 0; k < MAXH; k++) begin
        r.h[l][k].zeta  = 3'($urandom_range(0, 5));
        r.h[l][k].lc    = ($urandom_range(0, 5) == 0);
        r.h[l][k].coord = 14'($urandom);
      end
    end
    r.nx = $urandom_range(1, MAXX);
    for (int k = 0; k < MAXX; k++) begin
      r.x[k].c   = 15'($urandom);
      r.x[k].phi = 15'($urandom);
    end
    r.road = id;
    return r;
  endfunction

  // Cable words of a road packet.
  function automatic void road_words(input road_t r, ref word_t q [$]);
    word_t w;
    w.ee = 0;
    w.ep = 0;
    for (int l = 0; l < N_SVX; l++)
      for (int k = 0; k < r.nh[l]; k++) begin
        w.data = {3'(l), r.h[l][k]};
        q.push_back(w);
      end
    for (int k = 0; k < r.nx; k++) begin
      w.data = {3'd5, 3'd0, r.x[k].c};
      q.push_back(w);
      w.data = {6'd0, r.x[k].phi};
      q.push_back(w);
    end
    w.ep = 1;
    w.data = r.road;
    q.push_back(w);
  endfunction

  function automatic logic [20:0] xor_words(input word_t q [$]);
    logic [20:0] p = '0;
    foreach (q[i]) p ^= q[i].data;
    return p;
  endfunction

  function automatic word_t ee_word(input logic [11:0] err, input logic par, input logic [7:0] tag);
    word_t w;
    w.ee = 1;
    w.ep = 1;
    w.data = {err, par, tag};
    return w;
  endfunction

  // ---------------- reference track processor ----------------
  typedef struct {
    int nfits;      // fits computed
    int npass;      // fits passing the cut
    int nfive;      // 5/5 combinations
    int ntracks;    // tracks sent
    logic ovf;      // some fit overflowed
    logic inv;      // some combination dropped
  } stats_t;

  // Expected output words of one road; updates statistics.
  function automatic void expect_road(input road_t r, input longint cut, input int pen,
                                      ref word_t q [$], ref stats_t st);
    int idx [N_SVX + 1];
    int cnt [N_SVX + 1];
    int total;
    for (int l = 0; l < N_SVX; l++) cnt[l] = r.nh[l];
    cnt[N_SVX] = r.nx;
    total = 1;
    for (int l = 0; l <= N_SVX; l++) total *= (cnt[l] == 0) ? 1 : cnt[l];
    if (r.nx == 0) begin st.inv = 1; return; end
    for (int l = 0; l <= N_SVX; l++) idx[l] = 0;
    for (int c = 0; c < total; c++) begin
      int np;
      logic [4:0] hm;
      np = 0;
      for (int l = 0; l < N_SVX; l++) begin hm[l] = (cnt[l] != 0); np += int'(hm[l]); end
      if (np < 4) st.inv = 1;
      else begin
        int nseq;
        logic best_v;
        longint best_q;
        word_t best_w [7];
        nseq = (np == 5) ? 5 : 1;
        if (np == 5) st.nfive++;
        best_v = 0;
        best_q = 0;
        for (int s = 0; s < nseq; s++) begin
          int miss, j, nlc, set;
          logic [14:0] x [N_FIT];
          logic [3:0] lcm;
          logic [2:0] zin, zout;
          fitref_t f;
          longint c2s, qv;
          logic pass;
          miss = 0;
          if (np == 5) miss = s;
          else for (int l = N_SVX - 1; l >= 0; l--) if (!hm[l]) miss = l;
          j = 0; nlc = 0; lcm = 0; zin = 0; zout = 0;
          for (int l = 0; l < N_SVX; l++)
            if (l != miss) begin
              hit_t h;
              h = r.h[l][idx[l]];
              x[j] = 15'(h.coord);
              lcm[j] = h.lc;
              nlc += int'(h.lc);
              if (j == 0) zin = h.zeta;
              if (j == 3) zout = h.zeta;
              j++;
            end
          x[4] = r.x[idx[N_SVX]].c;
          x[5] = r.x[idx[N_SVX]].phi;
          set = int'(cond_map({zin, zout, 3'(miss), lcm}));
          f = fit(set, x);
          st.nfits++;
          if (f.ovf) st.ovf = 1;
          c2s = (f.chi2 > 64'd2097151) ? 64'd2097151 : f.chi2;
          pass = !f.ovf && (f.chi2 <= cut);
          qv = c2s + longint'(pen * nlc);
          if (pass) st.npass++;
          if (pass && (!best_v || qv < best_q)) begin
            best_v = 1;
            best_q = qv;
            for (int w = 0; w < 7; w++) begin best_w[w].ee = 0; best_w[w].ep = (w == 6); end
            best_w[0].data = {(np == 5), 1'b0, 1'b0, 18'(f.p[2])};
            best_w[1].data = {3'(miss), 18'(f.p[1])};
            best_w[2].data = {lcm[3:1], 18'(f.p[0])};
            best_w[3].data = 21'(c2s);
            best_w[4].data = {lcm[0], 5'd0, x[4]};
            best_w[5].data = {6'd0, x[5]};
            best_w[6].data = r.road;
          end
        end
        if (best_v) begin
          st.ntracks++;
          for (int w = 0; w < 7; w++) q.push_back(best_w[w]);
        end
      end
      // odometer step
      for (int l = 0; l <= N_SVX; l++) begin
        if (cnt[l] == 0 || idx[l] == cnt[l] - 1) idx[l] = 0;
        else begin idx[l]++; break; end
      end
    end
  endfunction

  // A whole event of one wedge: cable words in, expected words out
  // (tracks only; the caller builds the end-event word).
  function automatic void gen_event(input int nroads, input int kind3_at, input longint cut,
                                    input int pen, input int tag, input int wedge,
                                    ref word_t in_q [$], ref word_t out_q [$], ref stats_t st);
    word_t ev [$];
    for (int i = 0; i < nroads; i++) begin
      road_t r;
      r = gen_road((i == kind3_at) ? 3 : 0, 21'({wedge[3:0], tag[7:0], i[8:0]}));
      road_words(r, ev);
      expect_road(r, cut, pen, out_q, st);
    end
    foreach (ev[i]) in_q.push_back(ev[i]);
    in_q.push_back(ee_word(12'd0, ^xor_words(ev), 8'(tag)));
  endfunction

  // ---------------- reference Combiner and format converter ----------------
  // Expected 7-coordinate combinations of a road, in odometer order.
  function automatic void expect_combs(input road_t r, ref comb7_t q [$]);
    int idx [N_SVX + 1];
    int cnt [N_SVX + 1];
    int total;
    if (r.nx == 0) return;
    for (int l = 0; l < N_SVX; l++) cnt[l] = r.nh[l];
    cnt[N_SVX] = r.nx;
    total = 1;
    for (int l = 0; l <= N_SVX; l++) begin
      idx[l] = 0;
      total *= (cnt[l] == 0) ? 1 : cnt[l];
    end
    for (int c = 0; c < total; c++) begin
      comb7_t k;
      k = '0;
      for (int l = 0; l < N_SVX; l++) begin
        k.hitmap[l] = (cnt[l] != 0);
        if (cnt[l] != 0) k.hit[l] = r.h[l][idx[l]];
      end
      k.xft  = r.x[idx[N_SVX]];
      k.road = r.road;
      q.push_back(k);
      for (int l = 0; l <= N_SVX; l++) begin
        if (cnt[l] == 0 || idx[l] == cnt[l] - 1) idx[l] = 0;
        else begin idx[l]++; break; end
      end
    end
  endfunction

  // Expected fits of one combination (none if fewer than four layers).
  function automatic void expect_fits(input comb7_t k, ref fit_t q [$]);
    int np, nseq;
    np = 0;
    for (int l = 0; l < N_SVX; l++) np += int'(k.hitmap[l]);
    if (k.is_ee) begin
      fit_t f;
      f = '0;
      f.is_ee = 1; f.ee = k.ee; f.seq_first = 1; f.seq_last = 1;
      f.xft = k.xft; f.road = k.road;
      q.push_back(f);
      return;
    end
    if (np < 4) return;
    nseq = (np == 5) ? 5 : 1;
    for (int s = 0; s < nseq; s++) begin
      fit_t f;
      int miss, j;
      f = '0;
      miss = s;
      if (np == 4) for (int l = 0; l < N_SVX; l++) if (!k.hitmap[l]) miss = l;
      j = 0;
      for (int l = 0; l < N_SVX; l++) if (l != miss) begin
        f.x[j] = 15'(k.hit[l].coord);
        f.lcmap[j] = k.hit[l].lc;
        if (j == 0) f.zin = k.hit[l].zeta;
        if (j == 3) f.zout = k.hit[l].zeta;
        j++;
      end
      f.x[4] = k.xft.c; f.x[5] = k.xft.phi;
      f.miss = 3'(miss);
      f.five = (np == 5);
      f.seq_first = (s == 0);
      f.seq_last  = (s == nseq - 1);
      f.xft = k.xft; f.road = k.road;
      q.push_back(f);
    end
  endfunction
endpackage

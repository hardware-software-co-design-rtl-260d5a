// imt_ref_pkg: bench-side reference model of the accelerator's arithmetic,
// used by the tile, bank and top-level testbenches. It recomputes the network
// in plain integer arithmetic from the specification of each unit:
//   crossbar array : y = sat(sum x*W >>> shift) (8-bit saturation)
//   score          : sat(q.k >>> 3); softmax with LUT[0] = 65535,
//                    LUT[d] = round(LUT[d-1]*57835/65536), probabilities in
//                    1/127 units via one reciprocal with 20 fraction bits
//   value read     : sat(sum p*v >>> 7)
//   normalization  : s = x + r, mean/variance by shifts, k = floor(log2 var)/2,
//                    y = sat((s - mean)*16 >>> k)
//   feed-forward   : sat(W2 relu(sat(W1 x >>> 7)) >>> 7)
// Weights are not stored: both the bench programming and the model use wgen(),
// a hash of (array seed, row, column), so full-size networks need no tables.
package imt_ref_pkg;
  import imt_pkg::*;

  function automatic int wgen(input int seed, input int r, input int c);
    int unsigned h;
    h = 32'(seed) * 32'h9E3779B1 ^ 32'(r) * 32'h85EBCA77 ^ 32'(c) * 32'hC2B2AE3D;
    h ^= h >> 15; h *= 32'h2C1B3C6D; h ^= h >> 12; h *= 32'h297A2D39; h ^= h >> 15;
    return int'(h % 61) - 30;
  endfunction

  // seed of one weight array
  function automatic int seed_of(input bit dec, input int bank, input int tile, input int mat, input unit_e u);
    return (((int'(dec) * 64 + bank) * 4 + tile) * 128 + mat) * 8 + int'(u) + 1;
  endfunction

  function automatic int sat(input longint v);
    if (v > 127) return 127; if (v < -128) return -128; return int'(v);
  endfunction

  typedef int vec_t [];

  function automatic vec_t mvm(input vec_t x, input int seed, input int R, input int C, input int sh);
    vec_t y; y = new[C];
    for (int j = 0; j < C; j++) begin
      longint s; s = 0;
      for (int i = 0; i < R; i++) s += longint'(x[i]) * wgen(seed, i, j);
      y[j] = sat(s >>> sh);
    end
    return y;
  endfunction

  function automatic vec_t hsh(input vec_t v, input int seed, input int R, input int SW);
    vec_t h; h = new[SW];
    for (int b = 0; b < SW; b++) begin
      longint s; s = 0;
      for (int i = 0; i < R; i++) s += longint'(v[i]) * wgen(seed, i, b);
      h[b] = (s > 0) ? 1 : 0;
    end
    return h;
  endfunction

  function automatic vec_t norm(input vec_t x, input vec_t r);
    vec_t y; longint s [], sum, mean, vr; int k, D;
    D = x.size(); y = new[D]; s = new[D]; sum = 0;
    for (int i = 0; i < D; i++) begin s[i] = x[i] + r[i]; sum += s[i]; end
    mean = sum >>> $clog2(D);
    vr = 0; for (int i = 0; i < D; i++) vr += (s[i] - mean) * (s[i] - mean);
    vr = vr >>> $clog2(D);
    k = 0; while ((longint'(1) << (2*(k+1))) <= vr) k++;
    for (int i = 0; i < D; i++) y[i] = sat(((s[i] - mean) * 16) >>> k);
    return y;
  endfunction

  function automatic vec_t ff(input vec_t x, input int s1, input int s2, input int DM, input int DF);
    vec_t h;
    h = mvm(x, s1, DM, DF, 7);
    foreach (h[i]) if (h[i] < 0) h[i] = 0;
    return mvm(h, s2, DF, DM, 7);
  endfunction

  function automatic bit pat(input pattern_e p, input int col, input int qi, input int c, input int w, input int S);
    int b, d, ad; bit sl, st;
    b = ((col - qi) % (2*S) + 2*S) % (2*S);
    d = (b < S) ? b : b - 2*S; ad = d < 0 ? -d : d;
    sl = ad < w; st = (c > 0) && ((b % c) == 0);
    case (p)
      PAT_FULL: return 1; PAT_STRIDED: return st; PAT_SLIDING: return sl;
      PAT_DILATED: return sl && (ad % 2 == 0); default: return sl || st;
    endcase
  endfunction

  // one attention head with its caches
  class ref_head;
    int DM, DK, S, SW, sq, sk, sv, sh;
    vec_t K [$], V [$], G [$];
    int nq;
    int excluded;   // positions removed by the pattern, mask or LSH so far
    function new(int dm, int dk, int s, int sw, bit dec, int bank, int tile, int mat);
      DM = dm; DK = dk; S = s; SW = sw; nq = 0; excluded = 0;
      sq = seed_of(dec, bank, tile, mat, U_PUQ); sk = seed_of(dec, bank, tile, mat, U_PUK);
      sv = seed_of(dec, bank, tile, mat, U_PUV); sh = seed_of(dec, bank, tile, mat, U_HU);
    endfunction
    function void clear(); K.delete(); V.delete(); G.delete(); nq = 0; endfunction
    function void kv(vec_t x);
      vec_t k; k = mvm(x, sk, DM, DK, 7);
      K.push_back(k); V.push_back(mvm(x, sv, DM, DK, 7)); G.push_back(hsh(k, sh, DK, SW));
    endfunction
    function vec_t query(vec_t x, int tq, attn_cfg_t cfg);
      vec_t q, hq, o; int sc [], en [], m; longint sum, rcp, p;
      int lut [256];
      lut[0] = 65535; for (int d = 1; d < 256; d++) lut[d] = int'((longint'(lut[d-1]) * 57835 + 32768) >>> 16);
      q = mvm(x, sq, DM, DK, 7); hq = hsh(q, sh, DK, SW);
      sc = new[K.size()]; en = new[K.size()]; m = -128;
      for (int j = 0; j < K.size(); j++) begin
        longint d; int hd; d = 0; hd = 0;
        for (int i = 0; i < DK; i++) d += q[i] * K[j][i];
        for (int b = 0; b < SW; b++) hd += (hq[b] != G[j][b]) ? 1 : 0;
        en[j] = pat(cfg.pattern, j, nq, int'(cfg.stride), int'(cfg.window), S) && (!cfg.mask_en || j <= tq)
                && (!cfg.lsh_en || hd <= int'(cfg.hd_thresh));
        if (!en[j]) excluded++;
        sc[j] = sat(d >>> 3);
        if (en[j] && sc[j] > m) m = sc[j];
      end
      sum = 0; for (int j = 0; j < K.size(); j++) if (en[j]) sum += lut[m - sc[j]];
      rcp = (sum == 0) ? 0 : ((longint'(127) << 20) + sum / 2) / sum;
      o = new[DK];
      for (int i = 0; i < DK; i++) o[i] = 0;
      begin
        longint acc [];
        acc = new[DK]; foreach (acc[i]) acc[i] = 0;
        for (int j = 0; j < K.size(); j++) if (en[j]) begin
          p = (lut[m - sc[j]] * rcp + (longint'(1) << 19)) >>> 20;
          for (int i = 0; i < DK; i++) acc[i] += p * V[j][i];
        end
        for (int i = 0; i < DK; i++) o[i] = sat(acc[i] >>> 7);
      end
      nq++;
      return o;
    endfunction
  endclass

  // multi-head attention tile: heads plus aggregator
  class ref_tile;
    ref_head h [];
    int NH, DM, DK, sau;
    function new(int nh, int dm, int dk, int s, int sw, bit dec, int bank, int tile);
      NH = nh; DM = dm; DK = dk; h = new[nh];
      foreach (h[i]) h[i] = new(dm, dk, s, sw, dec, bank, tile, i);
      sau = seed_of(dec, bank, tile, 0, U_AU);
    endfunction
    function void clear(); foreach (h[i]) h[i].clear(); endfunction
    function void kv(vec_t x); foreach (h[i]) h[i].kv(x); endfunction
    function int excluded(); return h[0].excluded; endfunction
    function vec_t query(vec_t x, int tq, attn_cfg_t cfg);
      vec_t cat, o; cat = new[NH*DK];
      foreach (h[i]) begin o = h[i].query(x, tq, cfg); for (int j = 0; j < DK; j++) cat[i*DK+j] = o[j]; end
      return mvm(cat, sau, NH*DK, DM, 7);
    endfunction
    function int nkv(); return h[0].K.size(); endfunction
  endclass

  // drive one weight array of the DUT through the programming bus is done by
  // the benches; this gives the 64-weight segment of row r, column tile ct
  function automatic logic [XB*W_BITS-1:0] segment(input int seed, input int r, input int ct);
    logic [XB*W_BITS-1:0] d;
    for (int k = 0; k < XB; k++) d[k*W_BITS +: W_BITS] = 8'(wgen(seed, r, ct*XB + k));
    return d;
  endfunction

  // encoder layer: bidirectional attention over the whole sequence
  class ref_enc;
    ref_tile t; int DM, DF, s1, s2;
    function new(int nh, int dm, int dk, int df, int s, int sw, int bank);
      t = new(nh, dm, dk, s, sw, 0, bank, 0); DM = dm; DF = df;
      s1 = seed_of(0, bank, 0, 0, U_FF1); s2 = seed_of(0, bank, 0, 0, U_FF2);
    endfunction
    function void run(input vec_t xs [$], output vec_t ys [$], input attn_cfg_t cfg);
      vec_t a, h, f;
      t.clear(); ys.delete();
      foreach (xs[i]) t.kv(xs[i]);
      foreach (xs[i]) begin
        a = t.query(xs[i], i, cfg); h = norm(a, xs[i]); f = ff(h, s1, s2, DM, DF);
        ys.push_back(norm(f, h));
      end
    endfunction
  endclass

  // decoder layer: masked self-attention, encoder-decoder attention, FF
  class ref_dec;
    ref_tile ta, tc; int DM, DF, s1, s2, n;
    function new(int nh, int dm, int dk, int df, int s, int sw, int bank);
      ta = new(nh, dm, dk, s, sw, 1, bank, 0); tc = new(nh, dm, dk, s, sw, 1, bank, 1);
      DM = dm; DF = df; n = 0;
      s1 = seed_of(1, bank, 0, 0, U_FF1); s2 = seed_of(1, bank, 0, 0, U_FF2);
    endfunction
    function void clear(); ta.clear(); tc.clear(); n = 0; endfunction
    function void kv(vec_t x); tc.kv(x); endfunction
    function vec_t step(vec_t x, attn_cfg_t cs, attn_cfg_t cc);
      vec_t a, h1, c, h2, f;
      ta.kv(x); a = ta.query(x, n, cs); h1 = norm(a, x);
      c = tc.query(h1, n, cc); h2 = norm(c, h1);
      f = ff(h2, s1, s2, DM, DF); n++;
      return norm(f, h2);
    endfunction
  endclass
endpackage

// tb_ah_mat: end-to-end test of one attention-head mat (64-wide model, 64-entry
// caches, 64-bit signatures) against a bench model of the attention head:
// projections sat(W x >>> 7), scores sat(q.k >>> 3), softmax with the
// exponential table LUT[0] = 65535, LUT[d] = round(LUT[d-1]*57835/65536),
// probabilities in 1/127 units, output sat(sum p v >>> 7). Covered:
//   masked self-attention (OP_TOKEN, causal mask, full pattern), 5 steps;
//   bidirectional fill then queries with a sliding-window pattern;
//   content-based sparsity (LSH signatures, Hamming threshold), 8 steps;
//   caching of a broadcast pair (OP_KVW).
module tb_ah_mat;
  import imt_pkg::*;
  localparam int DM = 64, DK = 64, S = 64, SW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wprog_t prog; attn_cfg_t cfg; logic seq_start, op_valid, ready, done, a_valid, kv_wr;
  logic [1:0] op; act_t x [DM]; act_t k_ext [DK], v_ext [DK]; act_t a [DK]; act_t kv_k [DK], kv_v [DK];
  logic [15:0] kv_count, q_count, k_tiles; logic [7:0] steps;
  ah_mat #(.D_MODEL(DM), .D_K(DK), .SEQ_MAX(S), .SIG_W(SW)) dut (
    .clk, .rst_n, .prog, .prog_sel(1'b1), .cfg, .seq_start, .op_valid, .op, .x, .k_ext, .v_ext,
    .ready, .done, .a_valid, .a, .kv_wr, .kv_k, .kv_v, .kv_count, .q_count, .steps, .k_tiles);

  // ---------------- bench model ----------------
  int Wq [DM][DK], Wk [DM][DK], Wv [DM][DK], Hw [DK][SW];
  int Kc [S][DK], Vc [S][DK]; logic [SW-1:0] Sg [S];
  int n_kv, n_q;
  int lut [256];

  function automatic int sat(input longint v);
    if (v > 127) return 127; if (v < -128) return -128; return int'(v);
  endfunction
  function automatic void proj(input int xs [DM], input int W [DM][DK], output int o [DK]);
    for (int j = 0; j < DK; j++) begin longint s; s = 0; for (int i = 0; i < DM; i++) s += xs[i] * W[i][j]; o[j] = sat(s >>> 7); end
  endfunction
  function automatic logic [SW-1:0] hsh(input int v [DK]);
    logic [SW-1:0] h;
    for (int b = 0; b < SW; b++) begin longint s; s = 0; for (int i = 0; i < DK; i++) s += v[i] * Hw[i][b]; h[b] = (s > 0); end
    return h;
  endfunction
  // pattern bit at offset (column - query index)
  function automatic bit pat(input pattern_e p, input int col, input int qi, input int c, input int w);
    int b, d, ad; bit sl, st;
    b = ((col - qi) % (2*S) + 2*S) % (2*S);
    d = (b < S) ? b : b - 2*S; ad = d < 0 ? -d : d;
    sl = ad < w; st = (b % c) == 0;
    case (p)
      PAT_FULL: return 1; PAT_STRIDED: return st; PAT_SLIDING: return sl;
      PAT_DILATED: return sl && (ad % 2 == 0); default: return sl || st;
    endcase
  endfunction
  function automatic void attend(input int q [DK], input int tq, input int qi, output int o [DK]);
    bit en [S]; int sc [S]; int m; longint sum, rcp; int p [S]; logic [SW-1:0] hq;
    hq = hsh(q);
    m = -128;
    for (int j = 0; j < S; j++) begin
      longint d; d = 0; for (int i = 0; i < DK; i++) d += q[i] * Kc[j][i];
      en[j] = (j < n_kv) && pat(cfg.pattern, j, qi, int'(cfg.stride), int'(cfg.window)) && (!cfg.mask_en || j <= tq)
              && (!cfg.lsh_en || $countones(hq ^ Sg[j]) <= int'(cfg.hd_thresh));
      sc[j] = en[j] ? sat(d >>> 3) : 0;
      if (en[j] && sc[j] > m) m = sc[j];
    end
    sum = 0; for (int j = 0; j < S; j++) if (en[j]) sum += lut[m - sc[j]];
    rcp = (sum == 0) ? 0 : ((longint'(127) << 20) + sum / 2) / sum;
    for (int j = 0; j < S; j++) p[j] = en[j] ? int'((lut[m - sc[j]] * rcp + (1 << 19)) >>> 20) : 0;
    for (int i = 0; i < DK; i++) begin longint s; s = 0; for (int j = 0; j < S; j++) s += p[j] * Vc[j][i]; o[i] = sat(s >>> 7); end
  endfunction

  // ---------------- driving ----------------
  task automatic pw(input unit_e u, input int row, input int vals [XB]);
    @(negedge clk); prog = '0; prog.en = 1; prog.unit = u; prog.row = 12'(row);
    for (int k = 0; k < XB; k++) prog.data[k*8 +: 8] = 8'(vals[k]);
    @(negedge clk); prog.en = 0;
  endtask
  task automatic new_seq();
    @(negedge clk); seq_start = 1; @(negedge clk); seq_start = 0; n_kv = 0; n_q = 0;
  endtask
  task automatic do_op(input logic [1:0] o, input int xs [DM], input int exp_steps, input string name);
    int kp [DK], vp [DK], qp [DK], ref_a [DK]; int tq;
    foreach (x[i]) x[i] = act_t'(xs[i]);
    while (!ready) @(negedge clk);
    @(negedge clk); op = o; op_valid = 1; @(negedge clk); op_valid = 0;
    while (!done) @(negedge clk);
    check(int'(steps) == exp_steps, $sformatf("%s: %0d steps, expected %0d", name, steps, exp_steps));
    tq = n_q;
    if (o != 2'd1) begin
      if (o == 2'd3) begin foreach (kp[i]) begin kp[i] = int'(k_ext[i]); vp[i] = int'(v_ext[i]); end end
      else begin proj(xs, Wk, kp); proj(xs, Wv, vp); end
      Kc[n_kv] = kp; Vc[n_kv] = vp; Sg[n_kv] = hsh(kp); tq = n_kv; n_kv++;
    end
    check(int'(kv_count) == n_kv, $sformatf("%s: kv_count", name));
    if (o == 2'd1 || o == 2'd2) begin
      proj(xs, Wq, qp);
      attend(qp, tq, n_q, ref_a);
      n_q++;
      for (int i = 0; i < DK; i++)
        check(int'(a[i]) == ref_a[i], $sformatf("%s q%0d: a[%0d]=%0d expected %0d", name, n_q-1, i, a[i], ref_a[i]));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v [XB]; int xs [DM];
    lut[0] = 65535; for (int d = 1; d < 256; d++) lut[d] = int'((longint'(lut[d-1]) * 57835 + 32768) >>> 16);
    prog = '0; cfg = '0; seq_start = 0; op_valid = 0; op = 0;
    foreach (x[i]) x[i] = 0; foreach (k_ext[i]) begin k_ext[i] = 0; v_ext[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < DM; r++) begin
      for (int k = 0; k < XB; k++) begin Wq[r][k] = $urandom_range(0, 100) - 50; v[k] = Wq[r][k]; end pw(U_PUQ, r, v);
      for (int k = 0; k < XB; k++) begin Wk[r][k] = $urandom_range(0, 100) - 50; v[k] = Wk[r][k]; end pw(U_PUK, r, v);
      for (int k = 0; k < XB; k++) begin Wv[r][k] = $urandom_range(0, 255) - 128; v[k] = Wv[r][k]; end pw(U_PUV, r, v);
    end
    for (int r = 0; r < DK; r++) begin
      for (int k = 0; k < XB; k++) begin Hw[r][k] = $urandom_range(0, 255) - 128; v[k] = Hw[r][k]; end pw(U_HU, r, v);
    end
    // 1: masked self-attention, one token at a time
    cfg.pattern = PAT_FULL; cfg.stride = 4; cfg.window = 4; cfg.mask_en = 1; cfg.lsh_en = 0; cfg.hd_thresh = 0;
    new_seq();
    for (int t = 0; t < 10; t++) begin
      foreach (xs[i]) xs[i] = $urandom_range(0, 255) - 128;
      do_op(2'd2, xs, 5, "masked token");
    end
    // 2: bidirectional: cache all pairs, then query with a sliding window
    cfg.pattern = PAT_SLIDING; cfg.mask_en = 0;
    new_seq();
    begin
      int seqx [12][DM];
      for (int t = 0; t < 12; t++) begin foreach (xs[i]) begin seqx[t][i] = $urandom_range(0, 255) - 128; xs[i] = seqx[t][i]; end do_op(2'd0, xs, 2, "kv fill"); end
      for (int t = 0; t < 12; t++) begin xs = seqx[t]; do_op(2'd1, xs, 4, "bidirectional query"); end
    end
    // 3: content-based sparsity, masked, with strided pattern
    cfg.pattern = PAT_STRIDED; cfg.stride = 2; cfg.mask_en = 1; cfg.lsh_en = 1; cfg.hd_thresh = 28;
    new_seq();
    for (int t = 0; t < 10; t++) begin
      foreach (xs[i]) xs[i] = $urandom_range(0, 255) - 128;
      do_op(2'd2, xs, 8, "lsh token");
    end
    // 4: broadcast pairs then queries over them
    cfg.pattern = PAT_FULL; cfg.mask_en = 0; cfg.lsh_en = 0;
    new_seq();
    for (int t = 0; t < 6; t++) begin
      foreach (k_ext[i]) begin k_ext[i] = act_t'($urandom_range(0, 60) - 30); v_ext[i] = act_t'($urandom_range(0, 255) - 128); end
      do_op(2'd3, xs, 1, "broadcast write");
    end
    for (int t = 0; t < 3; t++) begin foreach (xs[i]) xs[i] = $urandom_range(0, 255) - 128; do_op(2'd1, xs, 4, "query after broadcast"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

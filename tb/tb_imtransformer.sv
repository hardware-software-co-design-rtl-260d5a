// tb_imtransformer: end-to-end test of the accelerator top with two encoder and
// two decoder banks (two heads, 128-wide model, 256-wide FF, 64-entry caches,
// 64-bit signatures). All weights are programmed through the single
// programming port. Each run streams a source sequence through the encoder
// chain (with random input gaps), lets the last encoder output be broadcast
// to both decoder banks, then gives one start element and lets the decoder
// run autoregressively. Every decoder output is compared with the bench model.
// Mechanisms are counted from the design's own signals and each must occur:
// input stall (back-pressure), causal-mask queries, pattern exclusions,
// LSH exclusions, kv broadcast, feedback of decoder outputs, overlap of two
// encoder banks working at the same time.
module tb_imtransformer;
  import imt_pkg::*;
  import imt_ref_pkg::*;
  localparam int NE = 2, ND = 2, NH = 2, DK = 64, DM = NH * DK, DF = 256, S = 64, SW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wprog_t prog; attn_cfg_t ecfg, dscfg, dccfg; logic seq_start;
  logic enc_in_valid, enc_in_last, enc_in_ready, dec_start_valid, dec_start_ready, dec_out_valid;
  logic enc_done, dec_done; logic [15:0] dec_len, dec_count;
  act_t enc_in_x [DM], dec_start_x [DM], dec_out_x [DM];
  imtransformer #(.N_ENC(NE), .N_DEC(ND), .N_HEADS(NH), .D_MODEL(DM), .D_K(DK), .D_FF(DF),
                  .SEQ_MAX(S), .SIG_W(SW)) dut (
    .clk, .rst_n, .prog, .enc_cfg(ecfg), .dec_self_cfg(dscfg), .dec_cross_cfg(dccfg), .seq_start,
    .enc_in_valid, .enc_in_last, .enc_in_x, .enc_in_ready, .dec_start_valid, .dec_start_x, .dec_start_ready,
    .dec_len, .dec_out_valid, .dec_out_x, .enc_done, .dec_done, .dec_count);

  ref_enc re [NE]; ref_dec rd [ND];

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_mask = 0, n_pat = 0, n_lsh = 0, n_bcast = 0, n_fb = 0, n_overlap = 0;
  vec_t got [$];
  always @(posedge clk) if (rst_n) begin
    if (enc_in_valid && !enc_in_ready) n_stall++;
    if (dut.kv_fire) n_bcast++;
    if (dut.feedback && dut.d_iv[0] && dut.d_ir[0]) n_fb++;
    if (dut.g_enc[0].u_bank.st != dut.g_enc[0].u_bank.E_FILL && dut.g_enc[1].u_bank.st != dut.g_enc[1].u_bank.E_FILL) n_overlap++;
    if (dut.g_dec[0].u_bank.u_mha_a.g_head[0].u_mat.cuk_start && dscfg.mask_en) n_mask++;
    if (dut.g_enc[0].u_bank.u_mha.g_head[0].u_mat.cuk_start)
      for (int j = 0; j < S; j++) if (16'(j) < dut.g_enc[0].u_bank.u_mha.g_head[0].u_mat.kv_count) begin
        if (!dut.g_enc[0].u_bank.u_mha.g_head[0].u_mat.as_en[j]) n_pat++;
        if (ecfg.lsh_en && !dut.g_enc[0].u_bank.u_mha.g_head[0].u_mat.match[j]) n_lsh++;
      end
    if (dut.g_dec[1].u_bank.u_mha_c.g_head[1].u_mat.cuk_start && dccfg.lsh_en)
      for (int j = 0; j < S; j++) if (16'(j) < dut.g_dec[1].u_bank.u_mha_c.g_head[1].u_mat.kv_count)
        if (!dut.g_dec[1].u_bank.u_mha_c.g_head[1].u_mat.match[j]) n_lsh++;
    if (dec_out_valid) begin vec_t v; v = new[DM]; foreach (v[i]) v[i] = int'(dec_out_x[i]); got.push_back(v); end
  end

  task automatic prog_arr(input bit dec, input int bank, input int tile, input int mat, input unit_e u, input int R, input int C);
    int sd; bit shared; shared = (u == U_AU || u == U_FF1 || u == U_FF2);
    sd = seed_of(dec, bank, (u == U_FF1 || u == U_FF2) ? 0 : tile, shared ? 0 : mat, u);
    for (int r = 0; r < R; r++) for (int ct = 0; ct < C / XB; ct++) begin
      @(negedge clk); prog = '0; prog.en = 1; prog.dec = dec; prog.bank = 5'(bank); prog.tile = 2'(tile);
      prog.mat = 7'(mat); prog.unit = u; prog.row = 12'(r); prog.ctile = 6'(ct); prog.data = segment(sd, r, ct);
    end
    @(negedge clk); prog.en = 0;
  endtask
  task automatic prog_tile(input bit dec, input int bank, input int tile);
    for (int h = 0; h < NH; h++) begin
      prog_arr(dec, bank, tile, h, U_PUQ, DM, DK); prog_arr(dec, bank, tile, h, U_PUK, DM, DK);
      prog_arr(dec, bank, tile, h, U_PUV, DM, DK); prog_arr(dec, bank, tile, h, U_HU, DK, SW);
    end
    prog_arr(dec, bank, tile, 0, U_AU, DM, DM);
  endtask

  function automatic vec_t rvec();
    vec_t v; v = new[DM]; foreach (v[i]) v[i] = $urandom_range(0, 120) - 60; return v;
  endfunction

  task automatic run(input int n, input int ndec, input string tag);
    vec_t xs [$], ys [$], ex [$], d;
    @(negedge clk); seq_start = 1; @(negedge clk); seq_start = 0;
    got.delete(); dec_len = 16'(ndec);
    for (int t = 0; t < n; t++) xs.push_back(rvec());
    ys = xs;
    for (int b = 0; b < NE; b++) begin vec_t o [$]; re[b].run(ys, o, ecfg); ys = o; end
    for (int b = 0; b < ND; b++) begin rd[b].clear(); foreach (ys[t]) rd[b].kv(ys[t]); end
    d = rvec();
    begin
      vec_t cur; cur = d;
      for (int k = 0; k < ndec; k++) begin
        for (int b = 0; b < ND; b++) cur = rd[b].step(cur, dscfg, dccfg);
        ex.push_back(cur);
      end
    end
    for (int t = 0; t < n; t++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      foreach (enc_in_x[i]) enc_in_x[i] = act_t'(xs[t][i]); enc_in_last = (t == n - 1); enc_in_valid = 1;
      @(posedge clk); while (!enc_in_ready) @(posedge clk);
      @(negedge clk); enc_in_valid = 0; enc_in_last = 0;
    end
    foreach (dec_start_x[i]) dec_start_x[i] = act_t'(d[i]); dec_start_valid = 1;
    @(posedge clk); while (!dec_start_ready) @(posedge clk);
    @(negedge clk); dec_start_valid = 0;
    while (!dec_done) @(posedge clk);
    repeat (50) @(posedge clk);
    check(got.size() == ndec, $sformatf("%s: %0d outputs, expected %0d", tag, got.size(), ndec));
    check(dut.g_dec[0].u_bank.cross_len == 16'(n) && dut.g_dec[1].u_bank.cross_len == 16'(n), {tag, ": both decoder banks hold all encoder pairs"});
    check(dut.g_dec[1].u_bank.self_len == 16'(ndec), {tag, ": decoder self cache length"});
    for (int k = 0; k < ndec && k < got.size(); k++) begin
      int bad; bad = 0;
      for (int i = 0; i < DM; i++) if (got[k][i] != ex[k][i]) begin
        if (bad < 3) $display("  %s k=%0d y[%0d]=%0d exp %0d", tag, k, i, got[k][i], ex[k][i]); bad++; end
      check(bad == 0, $sformatf("%s decoder output %0d", tag, k));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1000); $finish;
  end

  initial begin
    prog = '0; seq_start = 0; enc_in_valid = 0; enc_in_last = 0; dec_start_valid = 0; dec_len = 0;
    foreach (enc_in_x[i]) enc_in_x[i] = '0; foreach (dec_start_x[i]) dec_start_x[i] = '0;
    for (int b = 0; b < NE; b++) re[b] = new(NH, DM, DK, DF, S, SW, b);
    for (int b = 0; b < ND; b++) rd[b] = new(NH, DM, DK, DF, S, SW, b);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < NE; b++) begin
      prog_tile(0, b, 0); prog_arr(0, b, 0, 0, U_FF1, DM, DF); prog_arr(0, b, 0, 0, U_FF2, DF, DM);
    end
    for (int b = 0; b < ND; b++) begin
      prog_tile(1, b, 0); prog_tile(1, b, 1); prog_arr(1, b, 0, 0, U_FF1, DM, DF); prog_arr(1, b, 0, 0, U_FF2, DF, DM);
    end

    ecfg = '0; ecfg.pattern = PAT_GLOBAL_SLIDING; ecfg.stride = 6; ecfg.window = 3;
    dscfg = '0; dscfg.pattern = PAT_FULL; dscfg.mask_en = 1; dscfg.stride = 1; dscfg.window = 1;
    dccfg = '0; dccfg.pattern = PAT_FULL; dccfg.stride = 1; dccfg.window = 1; dccfg.lsh_en = 1; dccfg.hd_thresh = 28;
    run(12, 5, "run1");
    ecfg = '0; ecfg.pattern = PAT_STRIDED; ecfg.stride = 2; ecfg.window = 1; ecfg.lsh_en = 1; ecfg.hd_thresh = 27;
    dccfg = '0; dccfg.pattern = PAT_SLIDING; dccfg.stride = 1; dccfg.window = 5;
    run(9, 4, "run2");

    $display("mechanisms: stall=%0d mask=%0d pattern=%0d lsh=%0d broadcast=%0d feedback=%0d enc_overlap=%0d",
             n_stall, n_mask, n_pat, n_lsh, n_bcast, n_fb, n_overlap);
    check(n_stall > 0, "input stall seen");
    check(n_mask > 0, "masked self-attention queries seen");
    check(n_pat > 0, "pattern exclusions seen");
    check(n_lsh > 0, "LSH exclusions seen");
    check(n_bcast == 12 + 9, "each encoder output broadcast once");
    check(n_fb == 4 + 3, "decoder outputs fed back");
    check(n_overlap > 0, "encoder banks overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

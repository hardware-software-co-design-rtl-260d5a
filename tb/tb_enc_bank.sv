// tb_enc_bank: one encoder layer (two heads, 128-wide model, 256-wide FF,
// 64-entry caches, 64-bit signatures) checked element by element against the
// bench model: attention over the whole sequence, NU, FF, NU. Two sequences
// are streamed (global+sliding pattern; then LSH with a dilated pattern) with
// random gaps on the input and random back-pressure on the output, so the
// bank must hold its output while out_ready is low.
module tb_enc_bank;
  import imt_pkg::*;
  import imt_ref_pkg::*;
  localparam int NH = 2, DK = 64, DM = NH * DK, DF = 256, S = 64, SW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wprog_t prog; attn_cfg_t cfg; logic seq_start;
  logic in_valid, in_last, in_ready, out_valid, out_last, out_ready;
  act_t in_x [DM], out_x [DM]; logic [15:0] seq_len;
  enc_bank #(.N_HEADS(NH), .D_MODEL(DM), .D_K(DK), .D_FF(DF), .SEQ_MAX(S), .SIG_W(SW)) dut (
    .clk, .rst_n, .prog, .prog_sel(1'b1), .cfg, .seq_start, .in_valid, .in_last, .in_x, .in_ready,
    .out_valid, .out_last, .out_x, .out_ready, .seq_len);

  ref_enc re;
  vec_t got [$]; bit got_last [$];
  int stalls = 0;
  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      vec_t v; v = new[DM]; foreach (v[i]) v[i] = int'(out_x[i]);
      got.push_back(v); got_last.push_back(out_last);
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic prog_arr(input int tile, input int mat, input unit_e u, input int R, input int C);
    int sd; sd = seed_of(0, 0, tile, (u == U_AU || u == U_FF1 || u == U_FF2) ? 0 : mat, u);
    for (int r = 0; r < R; r++) for (int ct = 0; ct < C / XB; ct++) begin
      @(negedge clk); prog = '0; prog.en = 1; prog.tile = 2'(tile); prog.mat = 7'(mat); prog.unit = u;
      prog.row = 12'(r); prog.ctile = 6'(ct); prog.data = segment(sd, r, ct);
    end
    @(negedge clk); prog.en = 0;
  endtask

  function automatic vec_t rvec();
    vec_t v; v = new[DM]; foreach (v[i]) v[i] = $urandom_range(0, 120) - 60; return v;
  endfunction

  task automatic run_seq(input int n, input attn_cfg_t c, input string tag);
    vec_t xs [$], ys [$];
    cfg = c;
    @(negedge clk); seq_start = 1; @(negedge clk); seq_start = 0;
    got.delete(); got_last.delete();
    for (int t = 0; t < n; t++) xs.push_back(rvec());
    re.run(xs, ys, c);
    for (int t = 0; t < n; t++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      foreach (in_x[i]) in_x[i] = act_t'(xs[t][i]); in_last = (t == n - 1); in_valid = 1;
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0; in_last = 0;
    end
    check(seq_len == 16'(n), {tag, " seq_len"});
    while (got.size() < n) @(posedge clk);
    for (int t = 0; t < n; t++) begin
      int bad; bad = 0;
      for (int i = 0; i < DM; i++) if (got[t][i] != ys[t][i]) begin
        if (bad < 3) $display("  %s t=%0d y[%0d]=%0d exp %0d", tag, t, i, got[t][i], ys[t][i]); bad++; end
      check(bad == 0, $sformatf("%s output %0d", tag, t));
      check(got_last[t] == (t == n - 1), $sformatf("%s last flag %0d", tag, t));
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1000); $finish;
  end

  initial begin
    attn_cfg_t c;
    prog = '0; cfg = '0; seq_start = 0; in_valid = 0; in_last = 0;
    foreach (in_x[i]) in_x[i] = '0;
    re = new(NH, DM, DK, DF, S, SW, 0);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int h = 0; h < NH; h++) begin
      prog_arr(0, h, U_PUQ, DM, DK); prog_arr(0, h, U_PUK, DM, DK);
      prog_arr(0, h, U_PUV, DM, DK); prog_arr(0, h, U_HU, DK, SW);
    end
    prog_arr(0, 0, U_AU, DM, DM);
    prog_arr(0, 0, U_FF1, DM, DF); prog_arr(0, 0, U_FF2, DF, DM);

    c = '0; c.pattern = PAT_GLOBAL_SLIDING; c.stride = 8; c.window = 3;
    run_seq(12, c, "global+sliding");
    c = '0; c.pattern = PAT_DILATED; c.stride = 1; c.window = 9; c.lsh_en = 1; c.hd_thresh = 28;
    run_seq(18, c, "dilated+lsh");
    $display("output stall cycles %0d, excluded positions %0d", stalls, re.t.excluded());
    check(stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

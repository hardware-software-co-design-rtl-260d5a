// tb_mha_tile: multi-head attention tile with two heads (128-wide model,
// 64-wide heads, 64-entry caches, 64-bit signatures), checked output by output
// against the bench model (heads, concatenation, W^O aggregator). Covered:
//   masked self-attention, one element per operation (causal mask);
//   bidirectional fill (key/value operations) then queries, sliding window;
//   content-based sparsity (LSH) with a strided pattern;
//   causal mask over a fully cached sequence (later positions removed).
// Weights come from the hash generator of the model package.
module tb_mha_tile;
  import imt_pkg::*;
  import imt_ref_pkg::*;
  localparam int NH = 2, DK = 64, DM = NH * DK, S = 64, SW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wprog_t prog; attn_cfg_t cfg; logic seq_start, op_valid, ready, done;
  logic [1:0] op; act_t x [DM]; act_t y [DM];
  logic [15:0] kv_count, k_tiles; logic [7:0] steps;
  mha_tile #(.N_HEADS(NH), .D_MODEL(DM), .D_K(DK), .SEQ_MAX(S), .SIG_W(SW)) dut (
    .clk, .rst_n, .prog, .prog_sel(1'b1), .cfg, .seq_start, .op_valid, .op, .x, .ready, .done, .y,
    .kv_count, .k_tiles, .steps);

  ref_tile rt;
  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  task automatic prog_arr(input int mat, input unit_e u, input int R, input int C);
    int sd; sd = seed_of(0, 0, 0, (u == U_AU) ? 0 : mat, u);
    for (int r = 0; r < R; r++) for (int ct = 0; ct < C / XB; ct++) begin
      @(negedge clk); prog = '0; prog.en = 1; prog.mat = 7'(mat); prog.unit = u;
      prog.row = 12'(r); prog.ctile = 6'(ct); prog.data = segment(sd, r, ct);
    end
    @(negedge clk); prog.en = 0;
  endtask

  task automatic restart();
    @(negedge clk); seq_start = 1; @(negedge clk); seq_start = 0; rt.clear();
  endtask

  task automatic run_op(input int o, input vec_t xv);
    int d0; d0 = n_done;
    @(negedge clk); for (int i = 0; i < DM; i++) x[i] = act_t'(xv[i]); op = 2'(o); op_valid = 1;
    @(posedge clk); while (!ready) @(posedge clk);
    @(negedge clk); op_valid = 0;
    while (n_done == d0) @(posedge clk);
    @(negedge clk);
  endtask

  function automatic vec_t rvec();
    vec_t v; v = new[DM]; foreach (v[i]) v[i] = $urandom_range(0, 120) - 60; return v;
  endfunction

  task automatic cmp(input vec_t e, input string tag);
    int bad; bad = 0;
    for (int i = 0; i < DM; i++) if (int'(y[i]) != e[i]) begin
      if (bad < 3) $display("  %s y[%0d]=%0d exp %0d", tag, i, y[i], e[i]); bad++; end
    check(bad == 0, tag);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1000); $finish;
  end

  initial begin
    vec_t xs [$]; vec_t e;
    prog = '0; cfg = '0; seq_start = 0; op_valid = 0; op = 0;
    foreach (x[i]) x[i] = '0;
    rt = new(NH, DM, DK, S, SW, 0, 0, 0);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int h = 0; h < NH; h++) begin
      prog_arr(h, U_PUQ, DM, DK); prog_arr(h, U_PUK, DM, DK);
      prog_arr(h, U_PUV, DM, DK); prog_arr(h, U_HU, DK, SW);
    end
    prog_arr(0, U_AU, NH * DK, DM);

    // 1: masked self-attention
    cfg = '0; cfg.pattern = PAT_FULL; cfg.mask_en = 1; cfg.stride = 1; cfg.window = 1;
    restart();
    for (int t = 0; t < 12; t++) begin
      vec_t xv; xv = rvec();
      rt.kv(xv); e = rt.query(xv, t, cfg);
      run_op(2, xv); cmp(e, $sformatf("masked t=%0d", t));
      check(kv_count == 16'(t + 1), "kv_count after token");
    end

    // 2: bidirectional, sliding window
    cfg = '0; cfg.pattern = PAT_SLIDING; cfg.window = 4; cfg.stride = 1;
    restart(); xs.delete();
    for (int t = 0; t < 20; t++) begin xs.push_back(rvec()); rt.kv(xs[t]); run_op(0, xs[t]); end
    check(kv_count == 16'd20, "kv_count after fill");
    for (int t = 0; t < 20; t++) begin e = rt.query(xs[t], t, cfg); run_op(1, xs[t]); cmp(e, $sformatf("sliding t=%0d", t)); end

    // 3: LSH with strided pattern
    cfg = '0; cfg.pattern = PAT_STRIDED; cfg.stride = 2; cfg.window = 1; cfg.lsh_en = 1; cfg.hd_thresh = 26;
    restart(); xs.delete();
    for (int t = 0; t < 24; t++) begin xs.push_back(rvec()); rt.kv(xs[t]); run_op(0, xs[t]); end
    for (int t = 0; t < 24; t++) begin e = rt.query(xs[t], t, cfg); run_op(1, xs[t]); cmp(e, $sformatf("lsh t=%0d", t)); end
    // 4: whole sequence known, causal mask removes the later positions
    cfg = '0; cfg.pattern = PAT_FULL; cfg.stride = 1; cfg.window = 1; cfg.mask_en = 1;
    restart(); xs.delete();
    for (int t = 0; t < 16; t++) begin xs.push_back(rvec()); rt.kv(xs[t]); run_op(0, xs[t]); end
    for (int t = 0; t < 16; t++) begin e = rt.query(xs[t], t, cfg); run_op(1, xs[t]); cmp(e, $sformatf("causal t=%0d", t)); end
    $display("positions excluded by pattern/mask/LSH (head 0): %0d", rt.excluded());
    check(rt.excluded() > 0, "sparsity excluded some positions");
    check(n_done == 12 + 40 + 48 + 32, "done count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

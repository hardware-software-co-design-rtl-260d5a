// tb_dec_bank: one decoder layer (two heads, 128-wide model, 256-wide FF,
// 64-entry caches, 64-bit signatures) checked element by element against the
// bench model: masked self-attention (tile A), NU, encoder-decoder attention
// (tile C), NU, FF, NU. Encoder pairs arrive on the kv stream in two bursts,
// interleaved with decoder elements, and a kv element offered together with a
// decoder element must win. The output side has random back-pressure.
module tb_dec_bank;
  import imt_pkg::*;
  import imt_ref_pkg::*;
  localparam int NH = 2, DK = 64, DM = NH * DK, DF = 256, S = 64, SW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  wprog_t prog; attn_cfg_t cs, cc; logic seq_start;
  logic kv_valid, kv_ready, in_valid, in_ready, out_valid, out_ready;
  act_t kv_x [DM], in_x [DM], out_x [DM]; logic [15:0] self_len, cross_len;
  dec_bank #(.N_HEADS(NH), .D_MODEL(DM), .D_K(DK), .D_FF(DF), .SEQ_MAX(S), .SIG_W(SW)) dut (
    .clk, .rst_n, .prog, .prog_sel(1'b1), .cfg_self(cs), .cfg_cross(cc), .seq_start,
    .kv_valid, .kv_x, .kv_ready, .in_valid, .in_x, .in_ready, .out_valid, .out_x, .out_ready,
    .self_len, .cross_len);

  ref_dec rd;
  vec_t got [$];
  int stalls = 0, kv_first = 0;
  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      vec_t v; v = new[DM]; foreach (v[i]) v[i] = int'(out_x[i]); got.push_back(v);
    end
    if (kv_valid && in_valid && kv_ready) kv_first++;
    if (kv_valid && in_valid) check(!in_ready, "kv stream has priority");
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic prog_arr(input int tile, input int mat, input unit_e u, input int R, input int C);
    int sd; sd = seed_of(1, 0, (u == U_FF1 || u == U_FF2) ? 0 : tile, (u == U_AU || u == U_FF1 || u == U_FF2) ? 0 : mat, u);
    for (int r = 0; r < R; r++) for (int ct = 0; ct < C / XB; ct++) begin
      @(negedge clk); prog = '0; prog.en = 1; prog.dec = 1; prog.tile = 2'(tile); prog.mat = 7'(mat); prog.unit = u;
      prog.row = 12'(r); prog.ctile = 6'(ct); prog.data = segment(sd, r, ct);
    end
    @(negedge clk); prog.en = 0;
  endtask

  function automatic vec_t rvec();
    vec_t v; v = new[DM]; foreach (v[i]) v[i] = $urandom_range(0, 120) - 60; return v;
  endfunction

  vec_t exp_q [$];
  task automatic send_kv(input int n);
    for (int t = 0; t < n; t++) begin
      vec_t v; v = rvec(); rd.kv(v);
      @(negedge clk); foreach (kv_x[i]) kv_x[i] = act_t'(v[i]); kv_valid = 1;
      @(posedge clk); while (!kv_ready) @(posedge clk);
      @(negedge clk); kv_valid = 0;
    end
  endtask
  task automatic send_in(input int n);
    for (int t = 0; t < n; t++) begin
      vec_t v; v = rvec(); exp_q.push_back(rd.step(v, cs, cc));
      @(negedge clk); foreach (in_x[i]) in_x[i] = act_t'(v[i]); in_valid = 1;
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1000); $finish;
  end

  initial begin
    prog = '0; seq_start = 0; kv_valid = 0; in_valid = 0;
    foreach (kv_x[i]) kv_x[i] = '0; foreach (in_x[i]) in_x[i] = '0;
    cs = '0; cs.pattern = PAT_FULL; cs.mask_en = 1; cs.stride = 1; cs.window = 1;
    cc = '0; cc.pattern = PAT_SLIDING; cc.window = 6; cc.stride = 1;
    rd = new(NH, DM, DK, DF, S, SW, 0);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      for (int h = 0; h < NH; h++) begin
        prog_arr(t, h, U_PUQ, DM, DK); prog_arr(t, h, U_PUK, DM, DK);
        prog_arr(t, h, U_PUV, DM, DK); prog_arr(t, h, U_HU, DK, SW);
      end
      prog_arr(t, 0, U_AU, DM, DM);
    end
    prog_arr(0, 0, U_FF1, DM, DF); prog_arr(0, 0, U_FF2, DF, DM);

    @(negedge clk); seq_start = 1; @(negedge clk); seq_start = 0;
    send_kv(10);
    send_in(4);
    // offer a kv element and a decoder element in the same cycle
    begin
      vec_t k, v; k = rvec(); v = rvec();
      while (got.size() < 4) @(posedge clk);
      rd.kv(k); exp_q.push_back(rd.step(v, cs, cc));
      @(negedge clk); foreach (kv_x[i]) kv_x[i] = act_t'(k[i]); foreach (in_x[i]) in_x[i] = act_t'(v[i]);
      kv_valid = 1; in_valid = 1;
      @(posedge clk); while (!kv_ready) @(posedge clk);
      @(negedge clk); kv_valid = 0;
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    send_kv(5);
    send_in(6);
    while (got.size() < exp_q.size()) @(posedge clk);
    check(self_len == 16'(exp_q.size()), "self-attention cache length");
    check(cross_len == 16'd16, "encoder-decoder cache length");
    foreach (exp_q[t]) begin
      int bad; bad = 0;
      for (int i = 0; i < DM; i++) if (got[t][i] != exp_q[t][i]) begin
        if (bad < 3) $display("  t=%0d y[%0d]=%0d exp %0d", t, i, got[t][i], exp_q[t][i]); bad++; end
      check(bad == 0, $sformatf("output %0d", t));
    end
    check(kv_first > 0, "simultaneous kv/element offer seen");
    check(stalls > 0, "back-pressure exercised");
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ah_mat: attention-head mat (AH Mat), the in-memory unit that computes one
// attention head of multi-head attention for one sequence element at a time.
//
// Contents: three projection units (PU-Q, PU-K, PU-V: crossbars holding the
// static weights W^Q, W^K, W^V), the key and value caches (CU-K, CU-V:
// crossbars that are written with every new key and value), the hashing unit
// (HU) and sparsity unit (SU) for content-based sparsity, the attention
// selector (AS) for locality-based sparsity and masking, and the softmax
// look-up table. The mat follows the step sequence of the design description:
//   step 1  PROJ   x is projected by the PUs in parallel (q, k, v)
//   step 2  WRITE  k is written into column t of CU-K, v into row t of CU-V
//   step 3  QK     CU-K is read with q: scores q.k_j / 8 for enabled columns j
//   step 4  SOFT   softmax LUT
//   step 5  SDPA   CU-V is read with the probabilities: the head output a
// With content-based sparsity on, three steps are added: HASHK (HU hashes k;
// the signature is written into the SU at position t), HASHQ (HU hashes q) and
// SEARCH (the SU flags the keys whose signature lies within hd_thresh of H(q)).
//
// Column j takes part in a query with index tq when j < (keys cached), the AS
// bit j is set, (mask off or j <= tq) and (LSH off or the SU flags j). The AS
// is reloaded at seq_start and rotated after each query.
//
// Operations (op, with op_valid while ready is high):
//   OP_KV    project x into (k, v) and cache it (bidirectional and
//            encoder-decoder attention fill the caches this way)
//   OP_Q     project x into q and attend over the cached pairs
//   OP_TOKEN both, as masked self-attention does for each new element
//   OP_KVW   cache an already projected pair k_ext, v_ext (broadcast from
//            another mat of the same head, for model parallelism)
// kv_k/kv_v show the pair written in the WRITE step (kv_wr pulses) so that a
// parent can broadcast it. done pulses at the end of every operation, a_valid
// with it for operations that include a query. steps counts the steps of the
// last operation; k_tiles counts the CU-K tiles converted by its query.
// The step structure and units follow the design description; the handshake,
// the operation encoding and the output formats are this design's choices.
module ah_mat
  import imt_pkg::*;
#(
  parameter int D_MODEL  = 512,
  parameter int D_K      = 64,
  parameter int SEQ_MAX  = 512,
  parameter int SIG_W    = 1024,
  parameter int PU_SHIFT = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  // weight programming (prog_sel: this mat is addressed)
  input  wprog_t      prog,
  input  logic        prog_sel,
  // configuration
  input  attn_cfg_t   cfg,
  input  logic        seq_start,
  // operation
  input  logic        op_valid,
  input  logic [1:0]  op,
  input  act_t        x     [D_MODEL],
  input  act_t        k_ext [D_K],
  input  act_t        v_ext [D_K],
  output logic        ready,
  output logic        done,
  output logic        a_valid,
  output act_t        a     [D_K],
  output logic        kv_wr,
  output act_t        kv_k  [D_K],
  output act_t        kv_v  [D_K],
  // status
  output logic [15:0] kv_count,
  output logic [15:0] q_count,
  output logic [7:0]  steps,
  output logic [15:0] k_tiles
);
  localparam logic [1:0] OP_KV = 2'd0, OP_Q = 2'd1, OP_TOKEN = 2'd2, OP_KVW = 2'd3;

  typedef enum logic [3:0] {
    S_IDLE, S_PROJ, S_WRITE, S_HASHK, S_HASHQ, S_SEARCH, S_QK, S_SOFT, S_SDPA
  } state_e;

  state_e state;
  logic [1:0] op_r;
  logic has_q, has_kv;
  act_t x_r [D_MODEL];
  logic [15:0] tq;

  // ---------------- programming decode ----------------
  act_t pdata [XB];
  always_comb for (int k = 0; k < XB; k++) pdata[k] = act_t'(prog.data[k*W_BITS +: W_BITS]);
  logic wq, wk, wv, wh;
  assign wq = prog.en && prog_sel && prog.unit == U_PUQ;
  assign wk = prog.en && prog_sel && prog.unit == U_PUK;
  assign wv = prog.en && prog_sel && prog.unit == U_PUV;
  assign wh = prog.en && prog_sel && prog.unit == U_HU;

  // ---------------- projection units ----------------
  logic pu_start_q, pu_start_kv;
  logic puq_busy, puk_busy, puv_busy, puq_done, puk_done, puv_done;
  logic ones_dk [D_K];
  acc_t yq [D_K], yk [D_K], yv [D_K];
  act_t q_p [D_K], k_p [D_K], v_p [D_K];
  logic [15:0] t_q_u, t_k_u, t_v_u;
  always_comb for (int j = 0; j < D_K; j++) ones_dk[j] = 1'b1;

  xbar_array #(.R(D_MODEL), .C(D_K), .SHIFT(PU_SHIFT)) u_puq (
    .clk, .rst_n, .wr_en(wq), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(pu_start_q), .x(x_r), .col_en(ones_dk), .busy(puq_busy), .done(puq_done), .y(yq), .q(q_p), .tiles_read(t_q_u));
  xbar_array #(.R(D_MODEL), .C(D_K), .SHIFT(PU_SHIFT)) u_puk (
    .clk, .rst_n, .wr_en(wk), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(pu_start_kv), .x(x_r), .col_en(ones_dk), .busy(puk_busy), .done(puk_done), .y(yk), .q(k_p), .tiles_read(t_k_u));
  xbar_array #(.R(D_MODEL), .C(D_K), .SHIFT(PU_SHIFT)) u_puv (
    .clk, .rst_n, .wr_en(wv), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(pu_start_kv), .x(x_r), .col_en(ones_dk), .busy(puv_busy), .done(puv_done), .y(yv), .q(v_p), .tiles_read(t_v_u));


  // ---------------- caches ----------------
  logic cu_wr;
  logic cuk_start, cuk_busy, cuk_done, cuv_start, cuv_busy, cuv_done;
  logic col_en [SEQ_MAX];
  act_t score [SEQ_MAX];
  act_t prob  [SEQ_MAX];
  act_t a_v   [D_K];
  assign cu_wr = (state == S_WRITE);
  assign kv_wr = cu_wr;

  cu_k #(.D_K(D_K), .SEQ_MAX(SEQ_MAX)) u_cuk (
    .clk, .rst_n, .wr_en(cu_wr), .wr_pos(kv_count), .key(kv_k),
    .start(cuk_start), .q(q_p), .col_en, .busy(cuk_busy), .done(cuk_done), .score, .tiles_read(k_tiles));
  cu_v #(.D_K(D_K), .SEQ_MAX(SEQ_MAX)) u_cuv (
    .clk, .rst_n, .wr_en(cu_wr), .wr_pos(kv_count), .val(kv_v),
    .start(cuv_start), .p(prob), .row_en(col_en), .busy(cuv_busy), .done(cuv_done), .out(a_v));

  // ---------------- softmax ----------------
  logic sm_start, sm_done;
  softmax_lut #(.N(SEQ_MAX)) u_sm (
    .clk, .rst_n, .valid_in(sm_start), .s(score), .en(col_en), .valid_out(sm_done), .p(prob));

  // ---------------- hashing and sparsity ----------------
  logic hu_start, hu_busy, hu_done;
  act_t hu_x [D_K];
  logic [SIG_W-1:0] sig;
  logic su_wr, su_search, su_busy, su_done;
  logic match [SEQ_MAX];
  logic [15:0] hd [SEQ_MAX];
  logic [15:0] kpos;

  always_comb for (int j = 0; j < D_K; j++) hu_x[j] = (state == S_HASHK) ? kv_k[j] : q_p[j];

  hash_unit #(.D_K(D_K), .SIG_W(SIG_W)) u_hu (
    .clk, .rst_n, .wr_en(wh), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(hu_start), .x(hu_x), .busy(hu_busy), .done(hu_done), .sig);

  assign su_wr = (state == S_HASHK) && hu_done;
  sparsity_unit #(.N(SEQ_MAX), .SIG_W(SIG_W)) u_su (
    .clk, .rst_n, .clear(seq_start), .wr_en(su_wr), .wr_idx(kpos), .wr_sig(sig),
    .search(su_search), .key(sig), .thresh(cfg.hd_thresh), .busy(su_busy), .done(su_done),
    .match, .hdist(hd));

  // ---------------- attention selector ----------------
  logic as_shift;
  logic as_en [SEQ_MAX];
  logic [2*SEQ_MAX-1:0] as_reg;
  attn_selector #(.COLS(SEQ_MAX)) u_as (
    .clk, .rst_n, .load(seq_start), .pattern(cfg.pattern), .stride(cfg.stride), .window(cfg.window),
    .shift(as_shift), .col_en(as_en), .sel_reg(as_reg));

  // enabled columns for the current query
  always_comb
    for (int j = 0; j < SEQ_MAX; j++)
      col_en[j] = (16'(j) < kv_count) && as_en[j] && (!cfg.mask_en || 16'(j) <= tq)
                  && (!cfg.lsh_en || match[j]);

  // ---------------- sequencing ----------------
  // Every step starts its unit in the first cycle spent in its state (ent)
  // and ends when that unit reports done.
  logic   ent;
  logic   step_done;
  state_e nxt;
  act_t   k_ext_r [D_K], v_ext_r [D_K];

  assign ready  = (state == S_IDLE) && !seq_start;
  assign has_q  = (op_r == OP_Q) || (op_r == OP_TOKEN);
  assign has_kv = (op_r != OP_Q);

  always_comb begin
    pu_start_q  = (state == S_PROJ) && ent && has_q;
    pu_start_kv = (state == S_PROJ) && ent && ((op_r == OP_KV) || (op_r == OP_TOKEN));
    hu_start    = ((state == S_HASHK) || (state == S_HASHQ)) && ent;
    su_search   = (state == S_SEARCH) && ent;
    cuk_start   = (state == S_QK)     && ent;
    sm_start    = (state == S_SOFT)   && ent;
    cuv_start   = (state == S_SDPA)   && ent;
    as_shift    = (state == S_SDPA)   && cuv_done;
    case (state)
      S_PROJ:   step_done = has_q ? puq_done : puk_done;
      S_WRITE:  step_done = 1'b1;
      S_HASHK,
      S_HASHQ:  step_done = hu_done;
      S_SEARCH: step_done = su_done;
      S_QK:     step_done = cuk_done;
      S_SOFT:   step_done = sm_done;
      S_SDPA:   step_done = cuv_done;
      default:  step_done = 1'b0;
    endcase
    case (state)
      S_PROJ:   nxt = has_kv ? S_WRITE : (cfg.lsh_en ? S_HASHQ : S_QK);
      S_WRITE:  nxt = cfg.lsh_en ? S_HASHK : (has_q ? S_QK : S_IDLE);
      S_HASHK:  nxt = has_q ? S_HASHQ : S_IDLE;
      S_HASHQ:  nxt = S_SEARCH;
      S_SEARCH: nxt = S_QK;
      S_QK:     nxt = S_SOFT;
      S_SOFT:   nxt = S_SDPA;
      default:  nxt = S_IDLE;
    endcase
  end

  always_comb
    for (int j = 0; j < D_K; j++) begin
      kv_k[j] = (op_r == OP_KVW) ? k_ext_r[j] : k_p[j];
      kv_v[j] = (op_r == OP_KVW) ? v_ext_r[j] : v_p[j];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ent <= 1'b0; op_r <= OP_KV; kv_count <= '0; q_count <= '0; steps <= '0;
      done <= 1'b0; a_valid <= 1'b0; tq <= '0; kpos <= '0;
      for (int i = 0; i < D_MODEL; i++) x_r[i] <= '0;
      for (int j = 0; j < D_K; j++) begin a[j] <= '0; k_ext_r[j] <= '0; v_ext_r[j] <= '0; end
    end else begin
      done    <= 1'b0;
      a_valid <= 1'b0;
      ent     <= 1'b0;
      if (seq_start) begin
        state <= S_IDLE; kv_count <= '0; q_count <= '0;
      end else if (state == S_IDLE) begin
        if (op_valid) begin
          op_r  <= op;
          steps <= '0;
          tq    <= (op == OP_TOKEN) ? kv_count : q_count;
          for (int i = 0; i < D_MODEL; i++) x_r[i] <= x[i];
          for (int j = 0; j < D_K; j++) begin k_ext_r[j] <= k_ext[j]; v_ext_r[j] <= v_ext[j]; end
          state <= (op == OP_KVW) ? S_WRITE : S_PROJ;
          ent   <= 1'b1;
        end
      end else if (step_done) begin
        steps <= steps + 8'd1;
        if (state == S_WRITE) begin
          kpos     <= kv_count;
          kv_count <= kv_count + 16'd1;
        end
        if (state == S_SDPA) begin
          for (int j = 0; j < D_K; j++) a[j] <= a_v[j];
          a_valid <= 1'b1;
          q_count <= q_count + 16'd1;
        end
        if (nxt == S_IDLE) done <= 1'b1;
        state <= nxt;
        ent   <= (nxt != S_IDLE);
      end
    end
  end

endmodule

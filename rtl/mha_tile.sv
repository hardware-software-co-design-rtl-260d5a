// mha_tile: multi-head attention tile (MHA Tile): one AH mat per attention
// head plus the aggregator unit.
//
// An operation is given to all N_HEADS mats at once; they run in lock step
// (same sizes, same configuration). For operations that include a query the
// head outputs are then concatenated and projected by the aggregator (W^O).
// The grouping of AH mats with an aggregator follows the design description.
// This tile holds one mat per head; duplicating mats for attention-level
// parallelism is not built.
//
// Operations (op): 0 cache a key/value pair projected from x, 1 query with x,
// 2 both (masked self-attention step). op_valid is taken while ready is high.
// done pulses at the end of every operation; for queries y is valid then.
// Weights: prog with prog_sel; prog.mat selects the head for PU/HU writes,
// unit U_AU writes the aggregator.
module mha_tile
  import imt_pkg::*;
#(
  parameter int N_HEADS = 8,
  parameter int D_MODEL = 512,
  parameter int D_K     = 64,
  parameter int SEQ_MAX = 512,
  parameter int SIG_W   = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wprog_t      prog,
  input  logic        prog_sel,
  input  attn_cfg_t   cfg,
  input  logic        seq_start,
  input  logic        op_valid,
  input  logic [1:0]  op,
  input  act_t        x [D_MODEL],
  output logic        ready,
  output logic        done,
  output act_t        y [D_MODEL],
  // status of head 0
  output logic [15:0] kv_count,
  output logic [7:0]  steps,
  output logic [15:0] k_tiles
);
  logic m_ready [N_HEADS], m_done [N_HEADS], m_av [N_HEADS];
  act_t m_a [N_HEADS][D_K];
  act_t zero_dk [D_K];
  logic m_kvwr [N_HEADS];
  act_t m_kk [N_HEADS][D_K], m_kv [N_HEADS][D_K];
  logic [15:0] m_kvc [N_HEADS], m_qc [N_HEADS], m_kt [N_HEADS];
  logic [7:0]  m_st [N_HEADS];
  logic issue;

  always_comb for (int j = 0; j < D_K; j++) zero_dk[j] = '0;

  typedef enum logic [1:0] { T_IDLE, T_HEADS, T_AU } tstate_e;
  tstate_e st;
  logic    q_op;

  assign issue = op_valid && ready;

  for (genvar h = 0; h < N_HEADS; h++) begin : g_head
    ah_mat #(.D_MODEL(D_MODEL), .D_K(D_K), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_mat (
      .clk, .rst_n, .prog, .prog_sel(prog_sel && 32'(prog.mat) == h),
      .cfg, .seq_start, .op_valid(issue), .op, .x, .k_ext(zero_dk), .v_ext(zero_dk),
      .ready(m_ready[h]), .done(m_done[h]), .a_valid(m_av[h]), .a(m_a[h]),
      .kv_wr(m_kvwr[h]), .kv_k(m_kk[h]), .kv_v(m_kv[h]),
      .kv_count(m_kvc[h]), .q_count(m_qc[h]), .steps(m_st[h]), .k_tiles(m_kt[h]));
  end

  assign kv_count = m_kvc[0];
  assign steps    = m_st[0];
  assign k_tiles  = m_kt[0];

  // aggregator
  act_t pdata [XB];
  logic au_wr, au_start, au_busy, au_done;
  always_comb for (int k = 0; k < XB; k++) pdata[k] = act_t'(prog.data[k*W_BITS +: W_BITS]);
  assign au_wr    = prog.en && prog_sel && prog.unit == U_AU;
  assign au_start = (st == T_HEADS) && m_done[0] && q_op;

  aggregator_unit #(.N_HEADS(N_HEADS), .D_K(D_K), .D_MODEL(D_MODEL)) u_au (
    .clk, .rst_n, .wr_en(au_wr), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(au_start), .a(m_a), .busy(au_busy), .done(au_done), .y);

  assign ready = (st == T_IDLE) && m_ready[0] && !seq_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; q_op <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (seq_start) st <= T_IDLE;
      else case (st)
        T_IDLE:  if (issue) begin st <= T_HEADS; q_op <= (op != 2'd0); end
        T_HEADS: if (m_done[0]) begin
                   if (q_op) st <= T_AU;
                   else begin st <= T_IDLE; done <= 1'b1; end
                 end
        T_AU:    if (au_done) begin st <= T_IDLE; done <= 1'b1; end
        default: st <= T_IDLE;
      endcase
    end
  end

  // all heads run in lock step
  for (genvar h = 1; h < N_HEADS; h++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      (st == T_HEADS) |-> (m_done[h] == m_done[0]));
  end

endmodule

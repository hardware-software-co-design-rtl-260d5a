// enc_bank: encoder bank (Enc Bank), one encoder layer of the transformer.
//
// Holds an encoder MHA tile, a normalization unit shared by both sublayers
// and a feed-forward tile. Encoder attention is bidirectional: every element
// attends to all elements of the sequence, so the bank works in two phases.
//   fill:  each incoming element x_t is stored in the input buffer and its
//          key/value pair is projected and cached in the MHA tile;
//   query: after the last element, for t = 0..n-1: a = MHA(query x_t),
//          h = NU(a + x_t), f = FF(h), y_t = NU(f + h), sent downstream.
// The order MHA -> NU -> FF -> NU follows the design description. The input
// buffer that keeps the sequence for the query phase, and the valid/ready
// streams with a last flag, are this design's choices.
//
// Streams: an element moves when valid and ready are both high at a clock
// edge; in_last/out_last mark the final element. seq_start clears the bank.
module enc_bank
  import imt_pkg::*;
#(
  parameter int N_HEADS = 8,
  parameter int D_MODEL = 512,
  parameter int D_K     = 64,
  parameter int D_FF    = 2048,
  parameter int SEQ_MAX = 512,
  parameter int SIG_W   = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  wprog_t    prog,
  input  logic      prog_sel,
  input  attn_cfg_t cfg,
  input  logic      seq_start,
  input  logic      in_valid,
  input  logic      in_last,
  input  act_t      in_x [D_MODEL],
  output logic      in_ready,
  output logic      out_valid,
  output logic      out_last,
  output act_t      out_x [D_MODEL],
  input  logic      out_ready,
  output logic [15:0] seq_len
);
  localparam int AW = D_MODEL * W_BITS;

  typedef enum logic [3:0] {
    E_FILL, E_KV, E_QLOAD, E_Q, E_NU1, E_FF, E_NU2, E_OUT
  } estate_e;
  estate_e st;

  logic [AW-1:0] xbuf [SEQ_MAX];
  logic [15:0]   n, qi;
  logic          last_seen;
  act_t          cur [D_MODEL];   // element being projected or queried
  act_t          h   [D_MODEL];   // output of the first normalization

  // MHA tile
  logic t_valid, t_ready, t_done;
  logic [1:0] t_op;
  act_t t_y [D_MODEL];
  logic [15:0] t_kvc, t_kt;
  logic [7:0]  t_st;
  mha_tile #(.N_HEADS(N_HEADS), .D_MODEL(D_MODEL), .D_K(D_K), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_mha (
    .clk, .rst_n, .prog, .prog_sel(prog_sel && prog.tile == 2'd0 && prog.unit != U_FF1 && prog.unit != U_FF2),
    .cfg, .seq_start, .op_valid(t_valid), .op(t_op), .x(cur), .ready(t_ready), .done(t_done), .y(t_y),
    .kv_count(t_kvc), .steps(t_st), .k_tiles(t_kt));

  // shared normalization unit
  logic nu_start, nu_done;
  act_t nu_x [D_MODEL], nu_r [D_MODEL], nu_y [D_MODEL];
  norm_unit #(.D(D_MODEL)) u_nu (.clk, .rst_n, .start(nu_start), .x(nu_x), .r(nu_r), .done(nu_done), .y(nu_y));

  // feed-forward tile
  logic ff_start, ff_busy, ff_done;
  act_t ff_y [D_MODEL];
  ff_tile #(.D_MODEL(D_MODEL), .D_FF(D_FF)) u_ff (
    .clk, .rst_n, .prog, .prog_sel(prog_sel && (prog.unit == U_FF1 || prog.unit == U_FF2)),
    .start(ff_start), .x(h), .busy(ff_busy), .done(ff_done), .y(ff_y));

  logic ent;   // first cycle in a state

  assign in_ready = (st == E_FILL) && !seq_start && (32'(n) < SEQ_MAX);
  assign t_valid  = ((st == E_KV) || (st == E_Q)) && ent;
  assign t_op     = (st == E_KV) ? 2'd0 : 2'd1;
  assign ff_start = (st == E_FF) && ent;
  assign out_valid = (st == E_OUT);
  assign out_last  = (st == E_OUT) && (qi == n - 16'd1);
  assign seq_len   = n;

  always_comb begin
    nu_start = 1'b0;
    for (int i = 0; i < D_MODEL; i++) begin nu_x[i] = t_y[i]; nu_r[i] = cur[i]; end
    if (st == E_NU1) nu_start = ent;
    if (st == E_NU2) begin
      nu_start = ent;
      for (int i = 0; i < D_MODEL; i++) begin nu_x[i] = ff_y[i]; nu_r[i] = h[i]; end
    end
  end

  always_ff @(posedge clk) begin
    if (st == E_FILL && in_valid && in_ready) begin
      logic [AW-1:0] w;
      for (int i = 0; i < D_MODEL; i++) w[i*W_BITS +: W_BITS] = in_x[i];
      xbuf[n] <= w;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_FILL; n <= '0; qi <= '0; last_seen <= 1'b0; ent <= 1'b0;
      for (int i = 0; i < D_MODEL; i++) begin cur[i] <= '0; h[i] <= '0; out_x[i] <= '0; end
    end else begin
      ent <= 1'b0;
      if (seq_start) begin
        st <= E_FILL; n <= '0; qi <= '0; last_seen <= 1'b0;
      end else case (st)
        E_FILL: if (in_valid && in_ready) begin
          for (int i = 0; i < D_MODEL; i++) cur[i] <= in_x[i];
          n <= n + 16'd1; last_seen <= in_last;
          st <= E_KV; ent <= 1'b1;
        end
        E_KV: if (!ent && t_done) begin
          if (last_seen) begin st <= E_QLOAD; qi <= '0; end
          else st <= E_FILL;
        end
        E_QLOAD: begin
          logic [AW-1:0] w;
          w = xbuf[qi];
          for (int i = 0; i < D_MODEL; i++) cur[i] <= act_t'(w[i*W_BITS +: W_BITS]);
          st <= E_Q; ent <= 1'b1;
        end
        E_Q:   if (!ent && t_done)  begin st <= E_NU1; ent <= 1'b1; end
        E_NU1: if (!ent && nu_done) begin
          for (int i = 0; i < D_MODEL; i++) h[i] <= nu_y[i];
          st <= E_FF; ent <= 1'b1;
        end
        E_FF:  if (!ent && ff_done) begin st <= E_NU2; ent <= 1'b1; end
        E_NU2: if (!ent && nu_done) begin
          for (int i = 0; i < D_MODEL; i++) out_x[i] <= nu_y[i];
          st <= E_OUT;
        end
        E_OUT: if (out_ready) begin
          if (qi == n - 16'd1) begin st <= E_FILL; n <= '0; last_seen <= 1'b0; end
          else begin qi <= qi + 16'd1; st <= E_QLOAD; end
        end
        default: st <= E_FILL;
      endcase
    end
  end

endmodule

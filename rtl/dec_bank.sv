// dec_bank: decoder bank (Dec Bank), one decoder layer of the transformer.
//
// Holds two decoder MHA tiles, a shared normalization unit and a feed-forward
// tile. Tile A runs masked self-attention; tile C runs encoder-decoder
// attention. The keys and values of tile C come from the last encoder bank:
// every encoder output element arrives on the kv stream and is projected and
// cached (all decoder banks receive it at the same time, so the encoder-decoder
// pairs of all layers are computed in parallel and never recomputed). Each
// decoder element x then goes through
//   a  = tileA(token x)      cache (k,v) of x, attend with causal mask
//   h1 = NU(a + x)
//   c  = tileC(query h1)     attend over the encoder pairs
//   h2 = NU(c + h1)
//   f  = FF(h2)
//   y  = NU(f + h2)          sent downstream
// This order follows the design description; the streams and the priority of
// the kv stream over a new element are this design's choices.
//
// Weights: prog with prog_sel; prog.tile 0 selects tile A, 1 tile C, units
// U_FF1/U_FF2 the feed-forward tile. seq_start clears the bank.
module dec_bank
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
  input  attn_cfg_t cfg_self,
  input  attn_cfg_t cfg_cross,
  input  logic      seq_start,
  // encoder output (keys/values for encoder-decoder attention)
  input  logic      kv_valid,
  input  act_t      kv_x [D_MODEL],
  output logic      kv_ready,
  // decoder elements
  input  logic      in_valid,
  input  act_t      in_x [D_MODEL],
  output logic      in_ready,
  output logic      out_valid,
  output act_t      out_x [D_MODEL],
  input  logic      out_ready,
  output logic [15:0] self_len,
  output logic [15:0] cross_len
);
  typedef enum logic [3:0] {
    DS_IDLE, DS_KV, DS_A, DS_NU1, DS_C, DS_NU2, DS_FF, DS_NU3, DS_OUT
  } dstate_e;
  dstate_e st;
  logic ent;

  act_t cur [D_MODEL];    // element entering the layer, or encoder output on the kv path
  act_t h1  [D_MODEL];
  act_t h2  [D_MODEL];

  logic is_ff;
  assign is_ff = (prog.unit == U_FF1) || (prog.unit == U_FF2);

  // tile A: masked self-attention
  logic a_valid, a_ready, a_done;
  act_t a_y [D_MODEL];
  logic [15:0] a_kt; logic [7:0] a_st;
  mha_tile #(.N_HEADS(N_HEADS), .D_MODEL(D_MODEL), .D_K(D_K), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_mha_a (
    .clk, .rst_n, .prog, .prog_sel(prog_sel && prog.tile == 2'd0 && !is_ff),
    .cfg(cfg_self), .seq_start, .op_valid(a_valid), .op(2'd2), .x(cur), .ready(a_ready), .done(a_done), .y(a_y),
    .kv_count(self_len), .steps(a_st), .k_tiles(a_kt));

  // tile C: encoder-decoder attention
  logic c_valid, c_ready, c_done;
  logic [1:0] c_op;
  act_t c_x [D_MODEL];
  act_t c_y [D_MODEL];
  logic [15:0] c_kt; logic [7:0] c_st;
  mha_tile #(.N_HEADS(N_HEADS), .D_MODEL(D_MODEL), .D_K(D_K), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_mha_c (
    .clk, .rst_n, .prog, .prog_sel(prog_sel && prog.tile == 2'd1 && !is_ff),
    .cfg(cfg_cross), .seq_start, .op_valid(c_valid), .op(c_op), .x(c_x), .ready(c_ready), .done(c_done), .y(c_y),
    .kv_count(cross_len), .steps(c_st), .k_tiles(c_kt));

  // shared normalization unit
  logic nu_start, nu_done;
  act_t nu_x [D_MODEL], nu_r [D_MODEL], nu_y [D_MODEL];
  norm_unit #(.D(D_MODEL)) u_nu (.clk, .rst_n, .start(nu_start), .x(nu_x), .r(nu_r), .done(nu_done), .y(nu_y));

  // feed-forward tile
  logic ff_start, ff_busy, ff_done;
  act_t ff_y [D_MODEL];
  ff_tile #(.D_MODEL(D_MODEL), .D_FF(D_FF)) u_ff (
    .clk, .rst_n, .prog, .prog_sel(prog_sel && is_ff),
    .start(ff_start), .x(h2), .busy(ff_busy), .done(ff_done), .y(ff_y));

  assign kv_ready = (st == DS_IDLE) && c_ready && !seq_start;
  assign in_ready = (st == DS_IDLE) && a_ready && !seq_start && !kv_valid;
  assign a_valid  = (st == DS_A) && ent;
  assign c_valid  = ((st == DS_KV) || (st == DS_C)) && ent;
  assign c_op     = (st == DS_KV) ? 2'd0 : 2'd1;
  assign ff_start = (st == DS_FF) && ent;
  assign out_valid = (st == DS_OUT);

  always_comb begin
    for (int i = 0; i < D_MODEL; i++) c_x[i] = (st == DS_KV) ? cur[i] : h1[i];
    nu_start = ((st == DS_NU1) || (st == DS_NU2) || (st == DS_NU3)) && ent;
    for (int i = 0; i < D_MODEL; i++) begin
      case (st)
        DS_NU2:   begin nu_x[i] = c_y[i];  nu_r[i] = h1[i]; end
        DS_NU3:   begin nu_x[i] = ff_y[i]; nu_r[i] = h2[i]; end
        default: begin nu_x[i] = a_y[i];  nu_r[i] = cur[i]; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= DS_IDLE; ent <= 1'b0;
      for (int i = 0; i < D_MODEL; i++) begin cur[i] <= '0; h1[i] <= '0; h2[i] <= '0; out_x[i] <= '0; end
    end else begin
      ent <= 1'b0;
      if (seq_start) st <= DS_IDLE;
      else case (st)
        DS_IDLE: begin
          if (kv_valid && kv_ready) begin
            for (int i = 0; i < D_MODEL; i++) cur[i] <= kv_x[i];
            st <= DS_KV; ent <= 1'b1;
          end else if (in_valid && in_ready) begin
            for (int i = 0; i < D_MODEL; i++) cur[i] <= in_x[i];
            st <= DS_A; ent <= 1'b1;
          end
        end
        DS_KV:  if (!ent && c_done) st <= DS_IDLE;
        DS_A:   if (!ent && a_done) begin st <= DS_NU1; ent <= 1'b1; end
        DS_NU1: if (!ent && nu_done) begin
          for (int i = 0; i < D_MODEL; i++) h1[i] <= nu_y[i];
          st <= DS_C; ent <= 1'b1;
        end
        DS_C:   if (!ent && c_done) begin st <= DS_NU2; ent <= 1'b1; end
        DS_NU2: if (!ent && nu_done) begin
          for (int i = 0; i < D_MODEL; i++) h2[i] <= nu_y[i];
          st <= DS_FF; ent <= 1'b1;
        end
        DS_FF: if (!ent && ff_done) begin st <= DS_NU3; ent <= 1'b1; end
        DS_NU3: if (!ent && nu_done) begin
          for (int i = 0; i < D_MODEL; i++) out_x[i] <= nu_y[i];
          st <= DS_OUT;
        end
        DS_OUT: if (out_ready) st <= DS_IDLE;
        default: st <= DS_IDLE;
      endcase
    end
  end

endmodule

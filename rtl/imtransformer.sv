// imtransformer: in-memory transformer network accelerator, top level.
//
// The accelerator keeps a whole pre-trained encoder-decoder transformer in
// crossbar arrays and computes attention inside the memory. It is organised
// like a memory: banks (one per layer), tiles (MHA, FF) and mats (one per
// attention head). N_ENC encoder banks form a chain: the input sequence flows
// through them one bank after the other. Each output element of the last
// encoder bank is broadcast to all N_DEC decoder banks at once, which cache its
// key/value projection for encoder-decoder attention. Decoding is
// autoregressive: after a start element is given, the output of the last
// decoder bank becomes the next input of the first decoder bank, until dec_len
// outputs have been produced. The bank structure and connections follow the
// design description; the streaming handshakes, the start/length controls and
// feeding the raw decoder output back (no output embedding or token choice,
// which lie outside the accelerator) are this design's choices.
//
// Interface
//   prog          weight programming bus (one 64-weight segment per cycle)
//   *_cfg         attention configuration of encoder, decoder self and
//                 decoder cross attention (pattern, mask, LSH)
//   seq_start     one-cycle pulse clearing all caches and counters
//   enc_in_*      input sequence (valid/ready, last marks the final element)
//   dec_start_*   first decoder input, taken once the encoder sequence has
//                 been cached in the decoder banks
//   dec_out_*     decoder outputs (one valid pulse per element)
module imtransformer
  import imt_pkg::*;
#(
  parameter int N_ENC   = 6,
  parameter int N_DEC   = 6,
  parameter int N_HEADS = 8,
  parameter int D_MODEL = 512,
  parameter int D_K     = 64,
  parameter int D_FF    = 2048,
  parameter int SEQ_MAX = 512,
  parameter int SIG_W   = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wprog_t      prog,
  input  attn_cfg_t   enc_cfg,
  input  attn_cfg_t   dec_self_cfg,
  input  attn_cfg_t   dec_cross_cfg,
  input  logic        seq_start,
  input  logic        enc_in_valid,
  input  logic        enc_in_last,
  input  act_t        enc_in_x [D_MODEL],
  output logic        enc_in_ready,
  input  logic        dec_start_valid,
  input  act_t        dec_start_x [D_MODEL],
  output logic        dec_start_ready,
  input  logic [15:0] dec_len,
  output logic        dec_out_valid,
  output act_t        dec_out_x [D_MODEL],
  output logic        enc_done,
  output logic        dec_done,
  output logic [15:0] dec_count
);
  // ---------------- encoder chain ----------------
  logic e_iv [N_ENC+1], e_il [N_ENC+1], e_ir [N_ENC+1];
  act_t e_x  [N_ENC+1][D_MODEL];
  logic [15:0] e_len [N_ENC];

  assign e_iv[0] = enc_in_valid;
  assign e_il[0] = enc_in_last;
  assign e_x[0]  = enc_in_x;
  assign enc_in_ready = e_ir[0];

  for (genvar b = 0; b < N_ENC; b++) begin : g_enc
    enc_bank #(.N_HEADS(N_HEADS), .D_MODEL(D_MODEL), .D_K(D_K), .D_FF(D_FF), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_bank (
      .clk, .rst_n, .prog, .prog_sel(!prog.dec && 32'(prog.bank) == b), .cfg(enc_cfg), .seq_start,
      .in_valid(e_iv[b]), .in_last(e_il[b]), .in_x(e_x[b]), .in_ready(e_ir[b]),
      .out_valid(e_iv[b+1]), .out_last(e_il[b+1]), .out_x(e_x[b+1]), .out_ready(e_ir[b+1]),
      .seq_len(e_len[b]));
  end

  // ---------------- broadcast of encoder output to all decoder banks ----------------
  logic kv_rdy [N_DEC];
  logic kv_all_ready, kv_fire;
  always_comb begin
    kv_all_ready = 1'b1;
    for (int b = 0; b < N_DEC; b++) kv_all_ready &= kv_rdy[b];
  end
  assign e_ir[N_ENC] = kv_all_ready;
  assign kv_fire     = e_iv[N_ENC] && kv_all_ready;

  // ---------------- decoder chain ----------------
  logic d_iv [N_DEC+1], d_ir [N_DEC+1];
  act_t d_x  [N_DEC+1][D_MODEL];
  logic [15:0] d_sl [N_DEC], d_cl [N_DEC];
  logic started, feedback;

  assign feedback        = started && (dec_count + 16'd1 < dec_len);
  assign dec_start_ready = enc_done && !started && d_ir[0];
  assign d_iv[0] = feedback ? d_iv[N_DEC] : (dec_start_valid && enc_done && !started);
  assign d_x[0]  = feedback ? d_x[N_DEC]  : dec_start_x;
  assign d_ir[N_DEC] = feedback ? d_ir[0] : 1'b1;

  for (genvar b = 0; b < N_DEC; b++) begin : g_dec
    dec_bank #(.N_HEADS(N_HEADS), .D_MODEL(D_MODEL), .D_K(D_K), .D_FF(D_FF), .SEQ_MAX(SEQ_MAX), .SIG_W(SIG_W)) u_bank (
      .clk, .rst_n, .prog, .prog_sel(prog.dec && 32'(prog.bank) == b),
      .cfg_self(dec_self_cfg), .cfg_cross(dec_cross_cfg), .seq_start,
      .kv_valid(kv_fire), .kv_x(e_x[N_ENC]), .kv_ready(kv_rdy[b]),
      .in_valid(d_iv[b]), .in_x(d_x[b]), .in_ready(d_ir[b]),
      .out_valid(d_iv[b+1]), .out_x(d_x[b+1]), .out_ready(d_ir[b+1]),
      .self_len(d_sl[b]), .cross_len(d_cl[b]));
  end

  logic dec_fire;
  assign dec_fire      = d_iv[N_DEC] && d_ir[N_DEC];
  assign dec_out_valid = dec_fire;
  assign dec_out_x     = d_x[N_DEC];
  assign dec_done      = started && (dec_count >= dec_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_done <= 1'b0; started <= 1'b0; dec_count <= '0;
    end else if (seq_start) begin
      enc_done <= 1'b0; started <= 1'b0; dec_count <= '0;
    end else begin
      if (kv_fire && e_il[N_ENC]) enc_done <= 1'b1;
      if (dec_start_valid && dec_start_ready) started <= 1'b1;
      if (dec_fire) dec_count <= dec_count + 16'd1;
    end
  end

endmodule

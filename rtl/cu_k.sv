// cu_k: key caching unit (CU-K), a CMOS crossbar used as attention cache.
//
// Key k_t of sequence position t is written into column t, so the cache grows
// by columns and longer sequences only add column tiles working in parallel.
// A read with the projected query q gives the scores q.k_t of all enabled
// columns; columns switched off by the attention selector, the mask or the
// sparsity unit produce 0 and cost no conversion. The scores are scaled by
// 1/sqrt(d_k) = 1/8 for d_k = 64 by dropping the three least significant
// bits, as the design description states, and saturated to 8 bits.
//
// Interface: wr_en writes key at position wr_pos (one cycle). start reads with
// q and col_en; done pulses when score is valid (SEQ_MAX/64 tile cycles at most).
module cu_k
  import imt_pkg::*;
#(
  parameter int D_K     = 64,
  parameter int SEQ_MAX = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [15:0] wr_pos,
  input  act_t        key    [D_K],
  input  logic        start,
  input  act_t        q      [D_K],
  input  logic        col_en [SEQ_MAX],
  output logic        busy,
  output logic        done,
  output act_t        score  [SEQ_MAX],
  output logic [15:0] tiles_read
);
  initial assert (D_K == XB) else $fatal(1, "cu_k: one key must fit one crossbar column (D_K = 64)");

  acc_t y [SEQ_MAX];
  act_t wd [XB];
  always_comb for (int i = 0; i < XB; i++) wd[i] = key[i];

  xbar_array #(.R(D_K), .C(SEQ_MAX), .COL_MAJOR(1'b1), .SHIFT(3)) u_xb (
    .clk, .rst_n, .wr_en, .wr_seg(wr_pos), .wr_tsel(16'd0), .wr_data(wd),
    .start, .x(q), .col_en, .busy, .done, .y, .q(score), .tiles_read);

endmodule

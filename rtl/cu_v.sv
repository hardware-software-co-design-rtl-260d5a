// cu_v: value caching unit (CU-V), a CMOS crossbar used as attention cache.
//
// Value v_t of sequence position t is written into row t. A read drives the
// rows with the softmax probabilities p_t (units of 1/127) and returns
// sum_t p_t * v_t, scaled back by 2^-7 and saturated to 8 bits: the
// attention output of the head. Rows of disabled positions (masked future
// steps, positions outside the sparse pattern) are switched off by driving
// them with zero. The row-wise value cache follows the design description;
// the output scaling is this design's choice.
//
// Interface: wr_en writes val at row wr_pos. start reads with p and row_en;
// done pulses when out is valid (SEQ_MAX/64 tile cycles).
module cu_v
  import imt_pkg::*;
#(
  parameter int D_K     = 64,
  parameter int SEQ_MAX = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [15:0] wr_pos,
  input  act_t        val    [D_K],
  input  logic        start,
  input  act_t        p      [SEQ_MAX],
  input  logic        row_en [SEQ_MAX],
  output logic        busy,
  output logic        done,
  output act_t        out    [D_K]
);
  initial assert (D_K == XB) else $fatal(1, "cu_v: one value must fit one crossbar row (D_K = 64)");

  act_t x  [SEQ_MAX];
  logic ce [D_K];
  acc_t y  [D_K];
  act_t wd [XB];
  logic [15:0] tiles_unused;

  always_comb begin
    for (int t = 0; t < SEQ_MAX; t++) x[t] = row_en[t] ? p[t] : '0;
    for (int j = 0; j < D_K; j++) ce[j] = 1'b1;
    for (int i = 0; i < XB; i++) wd[i] = val[i];
  end

  xbar_array #(.R(SEQ_MAX), .C(D_K), .COL_MAJOR(1'b0), .SHIFT(7)) u_xb (
    .clk, .rst_n, .wr_en, .wr_seg(wr_pos), .wr_tsel(16'd0), .wr_data(wd),
    .start, .x, .col_en(ce), .busy, .done, .y, .q(out), .tiles_read(tiles_unused));

endmodule

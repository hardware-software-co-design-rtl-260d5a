// aggregator_unit: aggregator unit (AU) of a multi-head attention tile.
//
// Concatenates the outputs of the N_HEADS attention heads (D_K values each)
// and multiplies the concatenation by the static output projection W^O held in
// a crossbar array of (N_HEADS*D_K) x D_MODEL weights, giving the multi-head
// attention result. Concatenation plus W^O follows the design description; the
// output scaling (shift by 7, saturate to 8 bits) is this design's choice.
//
// Interface: weights are programmed through the segment port (row = input
// index, column tile). start with a valid; done pulses when y is valid,
// N_HEADS*D_K/64 * D_MODEL/64 tile cycles later.
module aggregator_unit
  import imt_pkg::*;
#(
  parameter int N_HEADS = 8,
  parameter int D_K     = 64,
  parameter int D_MODEL = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [15:0] wr_seg,
  input  logic [15:0] wr_tsel,
  input  act_t        wr_data [XB],
  input  logic        start,
  input  act_t        a [N_HEADS][D_K],
  output logic        busy,
  output logic        done,
  output act_t        y [D_MODEL]
);
  act_t cat [N_HEADS*D_K];
  logic ce  [D_MODEL];
  acc_t acc [D_MODEL];
  logic [15:0] tiles_unused;

  always_comb begin
    for (int h = 0; h < N_HEADS; h++)
      for (int j = 0; j < D_K; j++) cat[h*D_K + j] = a[h][j];
    for (int j = 0; j < D_MODEL; j++) ce[j] = 1'b1;
  end

  xbar_array #(.R(N_HEADS*D_K), .C(D_MODEL), .SHIFT(7)) u_xb (
    .clk, .rst_n, .wr_en, .wr_seg, .wr_tsel, .wr_data,
    .start, .x(cat), .col_en(ce), .busy, .done, .y(acc), .q(y), .tiles_read(tiles_unused));

endmodule

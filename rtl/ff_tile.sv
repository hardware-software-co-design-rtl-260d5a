// ff_tile: feed-forward tile (FF Tile) of an encoder or decoder bank.
//
// Two crossbar arrays hold the static feed-forward weights: the first maps
// D_MODEL inputs to D_FF hidden values, ReLU is applied, and the second maps
// the D_FF hidden values back to D_MODEL outputs. Two crossbar sub-arrays with
// ReLU between them follow the design description; D_FF = 2048 is the hidden
// size of the original transformer and the output scaling of each array
// (shift by 7, saturate to 8 bits) is this design's choice.
//
// Interface: weights are programmed with prog while prog_sel is high (unit
// U_FF1 or U_FF2). start with x valid; done pulses when y is valid. A pass
// takes D_MODEL/64 * D_FF/64 tile cycles for each array.
module ff_tile
  import imt_pkg::*;
#(
  parameter int D_MODEL = 512,
  parameter int D_FF    = 2048
) (
  input  logic   clk,
  input  logic   rst_n,
  input  wprog_t prog,
  input  logic   prog_sel,
  input  logic   start,
  input  act_t   x [D_MODEL],
  output logic   busy,
  output logic   done,
  output act_t   y [D_MODEL]
);
  act_t pdata [XB];
  logic w1, w2;
  always_comb for (int k = 0; k < XB; k++) pdata[k] = act_t'(prog.data[k*W_BITS +: W_BITS]);
  assign w1 = prog.en && prog_sel && prog.unit == U_FF1;
  assign w2 = prog.en && prog_sel && prog.unit == U_FF2;

  logic ce1 [D_FF], ce2 [D_MODEL];
  acc_t y1 [D_FF], y2 [D_MODEL];
  act_t h [D_FF], hr [D_FF];
  logic b1, b2, d1;
  logic [15:0] t1, t2;

  always_comb begin
    for (int j = 0; j < D_FF; j++) begin ce1[j] = 1'b1; hr[j] = (h[j] > 0) ? h[j] : '0; end
    for (int j = 0; j < D_MODEL; j++) ce2[j] = 1'b1;
  end

  xbar_array #(.R(D_MODEL), .C(D_FF), .SHIFT(7)) u_l1 (
    .clk, .rst_n, .wr_en(w1), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start, .x, .col_en(ce1), .busy(b1), .done(d1), .y(y1), .q(h), .tiles_read(t1));
  xbar_array #(.R(D_FF), .C(D_MODEL), .SHIFT(7)) u_l2 (
    .clk, .rst_n, .wr_en(w2), .wr_seg({4'd0, prog.row}), .wr_tsel({10'd0, prog.ctile}), .wr_data(pdata),
    .start(d1), .x(hr), .col_en(ce2), .busy(b2), .done, .y(y2), .q(y), .tiles_read(t2));

  assign busy = b1 || b2 || d1;

endmodule

// hash_unit: hashing unit (HU) for angular locality-sensitive hashing.
//
// A crossbar array stores SIG_W random hyperplane normals r_b (one per
// column). Reading it with a projected key or query v gives the dot products
// v.r_b, and signature bit b is H_b = (sign(v.r_b) + 1) / 2, i.e. 1 when the
// point lies on the positive side of hyperplane b. A dot product of exactly
// zero gives 0 (this design's choice). The crossbar implementation and the
// hash equation follow the design description; the signature length default
// of 1024 bits is the length the description evaluates.
//
// Interface: weights are programmed through the segment write port of the
// array (row = input dimension, column tile of 64 hyperplanes). start hashes x;
// done pulses when sig is valid (after the array read, SIG_W/64 tile cycles for
// D_K = 64).
module hash_unit
  import imt_pkg::*;
#(
  parameter int D_K   = 64,
  parameter int SIG_W = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [15:0] wr_seg,
  input  logic [15:0] wr_tsel,
  input  act_t        wr_data [XB],
  input  logic        start,
  input  act_t        x [D_K],
  output logic        busy,
  output logic        done,
  output logic [SIG_W-1:0] sig
);
  logic en_all [SIG_W];
  acc_t y [SIG_W];
  act_t q_unused [SIG_W];
  logic [15:0] tiles_unused;

  always_comb for (int j = 0; j < SIG_W; j++) en_all[j] = 1'b1;

  xbar_array #(.R(D_K), .C(SIG_W), .COL_MAJOR(1'b0), .SHIFT(0)) u_xb (
    .clk, .rst_n, .wr_en, .wr_seg, .wr_tsel, .wr_data,
    .start, .x, .col_en(en_all), .busy, .done, .y, .q(q_unused), .tiles_read(tiles_unused));

  always_comb for (int j = 0; j < SIG_W; j++) sig[j] = (y[j] > 0);

endmodule

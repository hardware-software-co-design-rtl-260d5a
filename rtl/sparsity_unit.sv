// sparsity_unit: sparsity unit (SU), a CMOS content-addressable memory that
// holds the LSH signatures H(K) of the cached keys.
//
// Entry t holds the signature of the key at sequence position t. A search
// compares the query signature H(q) with every valid entry in Hamming
// distance and flags the entries whose distance is at most thresh; only those
// keys take part in the attention. The CAM, the Hamming metric and the
// comparison of H(q) with H(K) follow the design description; selecting by a
// distance threshold (rather than ranking the m closest buckets) is this
// design's simplification. The CAM is split into 64-entry sub-arrays; the model
// searches one sub-array per clock, so a search takes N/64 cycles.
//
// Interface: clear invalidates all entries; wr_en writes wr_sig at wr_idx;
// search starts a search with key/thresh; done pulses when match and hdist are
// valid. Writes must not overlap a search.
module sparsity_unit
  import imt_pkg::*;
#(
  parameter int N     = 512,
  parameter int SIG_W = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [15:0]      wr_idx,
  input  logic [SIG_W-1:0] wr_sig,
  input  logic             search,
  input  logic [SIG_W-1:0] key,
  input  logic [15:0]      thresh,
  output logic             busy,
  output logic             done,
  output logic             match [N],
  output logic [15:0]      hdist  [N]
);
  localparam int SUB = N / XB;

  logic [XB*SIG_W-1:0] cam [SUB];
  logic                vld [N];
  logic [SIG_W-1:0]    key_r;
  logic [15:0]         th_r;
  logic [15:0]         sub_i;

  initial assert (N % XB == 0) else $fatal(1, "sparsity_unit: N must be a multiple of 64");

  always_ff @(posedge clk) begin
    if (wr_en)
      cam[32'(wr_idx) / XB][(32'(wr_idx) % XB)*SIG_W +: SIG_W] <= wr_sig;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; sub_i <= '0; key_r <= '0; th_r <= '0;
      for (int t = 0; t < N; t++) begin vld[t] <= 1'b0; match[t] <= 1'b0; hdist[t] <= '0; end
    end else begin
      done <= 1'b0;
      if (clear) for (int t = 0; t < N; t++) vld[t] <= 1'b0;
      else if (wr_en) vld[wr_idx] <= 1'b1;
      if (search && !busy) begin
        busy <= 1'b1; sub_i <= '0; key_r <= key; th_r <= thresh;
      end else if (busy) begin
        logic [XB*SIG_W-1:0] w;
        w = cam[sub_i];
        for (int e = 0; e < XB; e++) begin
          logic [15:0] hd;
          logic [SIG_W-1:0] diff;
          diff = w[e*SIG_W +: SIG_W] ^ key_r;
          hd = '0;
          for (int b = 0; b < SIG_W; b++) hd += 16'(diff[b]);
          hdist [32'(sub_i)*XB + e] <= hd;
          match[32'(sub_i)*XB + e] <= vld[32'(sub_i)*XB + e] && (hd <= th_r);
        end
        if (32'(sub_i) == SUB-1) begin busy <= 1'b0; done <= 1'b1; end
        sub_i <= sub_i + 16'd1;
      end
    end
  end

endmodule

// norm_unit: normalization unit (NU): residual addition followed by layer
// normalization using only additions, comparisons and shifts.
//
// For the D values s_i = x_i + r_i the unit computes the mean (sum shifted by
// log2 D), the deviations d_i = s_i - mean, the variance (sum of d_i^2 shifted
// by log2 D) and k = floor(log2(variance)) / 2, so that 2^k approximates the
// standard deviation. The output is y_i = sat8((d_i << OUT_SH) >>> k): the
// normalized value in units of 2^-OUT_SH. The NU stores no weights (no gain or
// bias), so it can be shared by all sublayers of a bank. Normalization by
// additions and shifts and the absence of stored weights follow the design
// description; the power-of-two approximation of the standard deviation,
// OUT_SH and including the residual addition are this design's choices.
//
// Interface: start with x and r valid; done and y one cycle later.
// D must be a power of two.
module norm_unit
  import imt_pkg::*;
#(
  parameter int D      = 512,
  parameter int OUT_SH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  act_t x [D],
  input  act_t r [D],
  output logic done,
  output act_t y [D]
);
  localparam int LD = $clog2(D);
  initial assert ((1 << LD) == D) else $fatal(1, "norm_unit: D must be a power of two");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < D; i++) y[i] <= '0;
    end else begin
      done <= start;
      if (start) begin
        acc_t sum, mean, var_s, dv;
        acc_t s [D];
        int k;
        sum = '0;
        for (int i = 0; i < D; i++) begin
          s[i] = acc_t'(x[i]) + acc_t'(r[i]);
          sum += s[i];
        end
        mean  = sum >>> LD;
        var_s = '0;
        for (int i = 0; i < D; i++) begin
          dv = s[i] - mean;
          var_s += dv * dv;
        end
        var_s = var_s >>> LD;
        k = 0;
        for (int b = 0; b < ACC_W; b++) if (var_s[b]) k = b;
        k = k / 2;
        for (int i = 0; i < D; i++)
          y[i] <= sat8((s[i] - mean) <<< OUT_SH, k);
      end
    end
  end

endmodule

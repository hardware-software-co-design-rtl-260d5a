// softmax_lut: softmax over the attention scores of one query, built around
// an exponential look-up table.
//
// Each score s[j] is a signed 8-bit number with three fractional bits. For the
// enabled positions the unit finds the maximum m, looks up
// e[j] = LUT[m - s[j]] with LUT[d] ~ 65535 * exp(-d/8), adds the e[j], forms one
// reciprocal of the sum and scales every e[j] by it. The result p[j] is the
// probability in units of 1/127 (0..127), so it can drive the value cache as an
// ordinary signed 8-bit input. Disabled positions get p = 0; if no position is
// enabled all p are 0. Using a look-up table for softmax follows the design
// description; the table contents, the fixed-point formats and the single
// reciprocal are this design's choices. The table is generated by the
// recurrence LUT[0] = 65535, LUT[d] = round(LUT[d-1] * 57835 / 65536), where
// 57835 = round(65536 * exp(-1/8)).
//
// Timing: p and valid_out are registered one cycle after valid_in.
module softmax_lut
  import imt_pkg::*;
#(
  parameter int N = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  act_t s  [N],
  input  logic en [N],
  output logic valid_out,
  output act_t p  [N]
);
  localparam int RB = 20;   // reciprocal fraction bits

  logic [15:0] lut [256];

  always_comb begin
    logic [31:0] v;
    v = 32'd65535;
    for (int d = 0; d < 256; d++) begin
      lut[d] = v[15:0];
      v = (v * 32'd57835 + 32'd32768) >> 16;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      for (int j = 0; j < N; j++) p[j] <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        int m;
        logic [47:0] sum;
        logic [31:0] rcp;
        logic [15:0] e [N];
        m   = -128;
        sum = '0;
        for (int j = 0; j < N; j++)
          if (en[j] && int'(s[j]) > m) m = int'(s[j]);
        for (int j = 0; j < N; j++) begin
          e[j] = en[j] ? lut[8'(m - int'(s[j]))] : 16'd0;
          sum += 48'(e[j]);
        end
        rcp = (sum == 0) ? 32'd0 : 32'(((48'd127 << RB) + (sum >> 1)) / sum);
        for (int j = 0; j < N; j++)
          p[j] <= act_t'((48'(e[j]) * 48'(rcp) + (48'd1 << (RB-1))) >> RB);
      end
    end
  end

endmodule

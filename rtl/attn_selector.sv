// attn_selector: configurable attention selector (AS) for locality-based
// sparse attention.
//
// A circular shift register of REG_W = 2*COLS bits holds the attention pattern.
// Bit b drives column b of the key cache for b < COLS; the other half is a
// buffer that holds the part of the pattern lying before the current position
// (negative offsets), so that a window centred on the query can slide. After
// every query time step the register rotates right by one bit (bit b moves to
// b+1, the last bit wraps to bit 0), which moves the pattern one column along.
// The register size (128 bits for a 64-column crossbar), the right shift per
// time step, the all-ones full pattern, strides that must divide the register
// length and a window set by the number of ones follow the design description;
// the exact offset sets below are this design's reading of the example
// patterns. For a bit b at offset d (d = b, or b - REG_W in the buffer half):
//   full            : all ones
//   strided         : b mod stride == 0
//   sliding window  : |d| < window
//   dilated window  : |d| < window and d even
//   global + sliding: sliding window or b mod stride == 0
//
// Interface: load (one cycle) writes the pattern selected by cfg; shift
// rotates by one; col_en is the register's first half. Both act at the clock
// edge; load wins over shift.
module attn_selector
  import imt_pkg::*;
#(
  parameter int COLS  = 64,
  parameter int REG_W = 2 * COLS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  pattern_e pattern,
  input  logic [7:0] stride,
  input  logic [7:0] window,
  input  logic     shift,
  output logic     col_en [COLS],
  output logic [REG_W-1:0] sel_reg
);

  function automatic logic pat_bit(input pattern_e p, input int b, input int c, input int w);
    int d, ad;
    logic sl, st;
    d  = (b < COLS) ? b : b - REG_W;
    ad = (d < 0) ? -d : d;
    sl = (ad < w);
    st = (c > 0) ? ((b % c) == 0) : 1'b0;
    case (p)
      PAT_FULL:           return 1'b1;
      PAT_STRIDED:        return st;
      PAT_SLIDING:        return sl;
      PAT_DILATED:        return sl && ((ad % 2) == 0);
      PAT_GLOBAL_SLIDING: return sl || st;
      default:            return 1'b1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_reg <= '1;
    end else if (load) begin
      for (int b = 0; b < REG_W; b++)
        sel_reg[b] <= pat_bit(pattern, b, int'(stride), int'(window));
    end else if (shift) begin
      sel_reg <= {sel_reg[REG_W-2:0], sel_reg[REG_W-1]};
    end
  end

  always_comb
    for (int j = 0; j < COLS; j++) col_en[j] = sel_reg[j];

endmodule

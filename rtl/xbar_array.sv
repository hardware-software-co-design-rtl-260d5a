// xbar_array: behavioural model of an in-memory crossbar array built from
// 64x64 crossbar tiles with 8-bit cells (R x C weights in total).
//
// A read multiplies the input vector x (one value per row) with the stored
// matrix: y[j] = sum_i x[i] * W[i][j] for every enabled column j, and zero for
// a disabled column (its converter is switched off). Rows that span several
// tiles produce partial sums that are added digitally. In silicon every tile
// converts its columns at once; this model evaluates one 64x64 tile per clock
// (column tiles outer, row tiles inner) and skips a column tile whose 64
// columns are all disabled, so a read takes at most R/64 * C/64 cycles. The
// converters are modelled as ideal; q[] is y[] shifted right by SHIFT and
// saturated to 8 bits, the scaling the column converters apply.
//
// Writes store one 64-weight segment per cycle. With COL_MAJOR = 0 a segment
// is a row of one column tile (wr_seg = row, wr_tsel = column tile); with
// COL_MAJOR = 1 it is a column of one row tile (wr_seg = column, wr_tsel = row
// tile), the way an attention cache stores one key per column.
//
// Timing: start is accepted when busy is low; done pulses for one cycle when
// y/q hold the result, and they keep it until the next start.
module xbar_array
  import imt_pkg::*;
#(
  parameter int R         = 64,
  parameter int C         = 64,
  parameter bit COL_MAJOR = 1'b0,
  parameter int SHIFT     = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // segment write
  input  logic        wr_en,
  input  logic [15:0] wr_seg,
  input  logic [15:0] wr_tsel,
  input  act_t        wr_data [XB],
  // matrix-vector read
  input  logic        start,
  input  act_t        x       [R],
  input  logic        col_en  [C],
  output logic        busy,
  output logic        done,
  output acc_t        y       [C],
  output act_t        q       [C],
  output logic [15:0] tiles_read   // tiles converted by the last read
);
  localparam int RT = R / XB;
  localparam int CT = C / XB;
  localparam int NT = RT * CT;
  localparam int TW = XB * XB * W_BITS;

  initial begin
    assert (R % XB == 0 && C % XB == 0) else $fatal(1, "xbar_array: R and C must be multiples of 64");
  end

  logic [TW-1:0] mem [NT];

  act_t  x_r   [R];
  logic  en_r  [C];
  acc_t  acc   [C];
  logic [15:0] rt_i, ct_i;

  // ---------------- writes ----------------
  always_ff @(posedge clk) begin
    if (wr_en) begin
      int unsigned seg_i, tile_i;
      seg_i = 32'(wr_seg) % XB;
      if (!COL_MAJOR) tile_i = (32'(wr_seg) / XB) * CT + 32'(wr_tsel);
      else            tile_i = 32'(wr_tsel) * CT + 32'(wr_seg) / XB;
      for (int k = 0; k < XB; k++)
        mem[tile_i][(seg_i*XB + k)*W_BITS +: W_BITS] <= wr_data[k];
    end
  end

  // column tile ct has at least one enabled column
  function automatic logic ct_active(input logic [15:0] ct);
    logic a;
    a = 1'b0;
    for (int j = 0; j < XB; j++) a |= en_r[32'(ct)*XB + j];
    return a;
  endfunction

  // ---------------- reads ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      rt_i       <= '0;
      ct_i       <= '0;
      tiles_read <= '0;
      for (int j = 0; j < C; j++) begin acc[j] <= '0; en_r[j] <= 1'b0; end
      for (int i = 0; i < R; i++) x_r[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= 1'b1;
        rt_i       <= '0;
        ct_i       <= '0;
        tiles_read <= '0;
        for (int i = 0; i < R; i++) x_r[i] <= x[i];
        for (int j = 0; j < C; j++) begin acc[j] <= '0; en_r[j] <= col_en[j]; end
      end else if (busy) begin
        logic last;
        if (ct_active(ct_i)) begin
          logic [TW-1:0] tw;
          tw = mem[32'(rt_i)*CT + 32'(ct_i)];
          for (int j = 0; j < XB; j++) begin
            acc_t s;
            s = '0;
            for (int i = 0; i < XB; i++) begin
              act_t w;
              if (!COL_MAJOR) w = act_t'(tw[(i*XB + j)*W_BITS +: W_BITS]);
              else            w = act_t'(tw[(j*XB + i)*W_BITS +: W_BITS]);
              s += acc_t'(x_r[32'(rt_i)*XB + i]) * acc_t'(w);
            end
            acc[32'(ct_i)*XB + j] <= acc[32'(ct_i)*XB + j] + s;
          end
          tiles_read <= tiles_read + 16'd1;
          last = (32'(rt_i) == RT-1) && (32'(ct_i) == CT-1);
          if (32'(rt_i) == RT-1) begin rt_i <= '0; ct_i <= ct_i + 16'd1; end
          else                   rt_i <= rt_i + 16'd1;
        end else begin
          // whole column tile disabled: no conversion, move on
          last = (32'(ct_i) == CT-1);
          rt_i <= '0;
          ct_i <= ct_i + 16'd1;
        end
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < C; j++) begin
      y[j] = en_r[j] ? acc[j] : '0;
      q[j] = sat8(y[j], SHIFT);
    end
  end

endmodule

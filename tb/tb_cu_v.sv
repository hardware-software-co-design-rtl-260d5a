// tb_cu_v: writes random values into a 128 x 64 value cache, one row per
// position, and checks sum_t p_t * v_t >>> 7 (saturated) for random
// probabilities, with disabled rows contributing nothing.
module tb_cu_v;
  import imt_pkg::*;
  localparam int DK = 64, S = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic wr, st, busy, done; logic [15:0] pos; act_t val [DK]; act_t p [S]; logic en [S]; act_t out [DK];
  cu_v #(.D_K(DK), .SEQ_MAX(S)) dut (.clk, .rst_n, .wr_en(wr), .wr_pos(pos), .val, .start(st), .p, .row_en(en),
    .busy, .done, .out);
  int vv [S][DK];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ps [S];
    wr = 0; st = 0; pos = 0; foreach (val[i]) val[i] = 0; foreach (p[t]) p[t] = 0; foreach (en[t]) en[t] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < S; t++) begin
      foreach (val[i]) begin vv[t][i] = $urandom_range(0, 255) - 128; val[i] = act_t'(vv[t][i]); end
      @(negedge clk); pos = 16'(t); wr = 1; @(negedge clk); wr = 0;
    end
    for (int trial = 0; trial < 8; trial++) begin
      foreach (p[t]) begin ps[t] = $urandom_range(0, (trial < 4) ? 3 : 20); p[t] = act_t'(ps[t]); en[t] = 1'($urandom_range(0, 1)); end
      @(negedge clk); st = 1; @(posedge clk); #1; st = 0;
      while (!done) begin @(posedge clk); #1; end
      for (int j = 0; j < DK; j++) begin
        int d, e; d = 0;
        for (int t = 0; t < S; t++) if (en[t]) d += ps[t] * vv[t][j];
        e = d >>> 7; if (e > 127) e = 127; if (e < -128) e = -128;
        check(int'(out[j]) == e, $sformatf("out[%0d]=%0d expected %0d", j, out[j], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ff_tile: programs a 64 -> 128 -> 64 feed-forward tile through the
// programming bus and checks y = sat(W2 relu(sat(W1 x >>> 7)) >>> 7) for random
// inputs, that writes for another unit are ignored, and the latency
// (first array 2 tiles, second array 2 tiles).
module tb_ff_tile;
  import imt_pkg::*;
  localparam int DM = 64, DF = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  wprog_t prog; logic sel, st, busy, done; act_t x [DM], y [DM];
  ff_tile #(.D_MODEL(DM), .D_FF(DF)) dut (.clk, .rst_n, .prog, .prog_sel(sel), .start(st), .x, .busy, .done, .y);
  int w1 [DM][DF]; int w2 [DF][DM];
  function automatic int sat(input int v); if (v > 127) return 127; if (v < -128) return -128; return v; endfunction
  task automatic pw(input unit_e u, input int row, input int ct, input int vals [XB], input bit s);
    @(negedge clk); prog = '0; prog.en = 1; prog.unit = u; prog.row = 12'(row); prog.ctile = 6'(ct);
    for (int k = 0; k < XB; k++) prog.data[k*8 +: 8] = 8'(vals[k]);
    sel = s; @(negedge clk); prog.en = 0;
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int v [XB]; int xs [DM];
    prog = '0; sel = 0; st = 0; foreach (x[i]) x[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < DM; r++) for (int ct = 0; ct < DF/XB; ct++) begin
      for (int k = 0; k < XB; k++) begin w1[r][ct*XB+k] = $urandom_range(0, 255) - 128; v[k] = w1[r][ct*XB+k]; end
      pw(U_FF1, r, ct, v, 1);
    end
    for (int r = 0; r < DF; r++) begin
      for (int k = 0; k < XB; k++) begin w2[r][k] = $urandom_range(0, 255) - 128; v[k] = w2[r][k]; end
      pw(U_FF2, r, 0, v, 1);
    end
    // writes to other units or with the tile not selected must not land
    for (int k = 0; k < XB; k++) v[k] = 127;
    pw(U_PUQ, 0, 0, v, 1);
    pw(U_FF1, 0, 0, v, 0);
    for (int trial = 0; trial < 8; trial++) begin
      int h [DF]; int cyc;
      foreach (x[i]) begin xs[i] = $urandom_range(0, 255) - 128; x[i] = act_t'(xs[i]); end
      @(negedge clk); st = 1; @(posedge clk); #1; st = 0; cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      check(cyc == 2 + 1 + 2, $sformatf("latency %0d", cyc));
      for (int j = 0; j < DF; j++) begin
        int a; a = 0; for (int i = 0; i < DM; i++) a += xs[i] * w1[i][j];
        h[j] = sat(a >>> 7); if (h[j] < 0) h[j] = 0;
      end
      for (int j = 0; j < DM; j++) begin
        int a; a = 0; for (int i = 0; i < DF; i++) a += h[i] * w2[i][j];
        check(int'(y[j]) == sat(a >>> 7), $sformatf("y[%0d]=%0d expected %0d", j, y[j], sat(a >>> 7)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_xbar_array: self-checking test of the crossbar array model.
// A row-major 128x192 array and a column-major 64x128 array are programmed
// with random weights kept in a reference matrix; random inputs and column
// enables (including a fully disabled column tile) are applied and every
// column sum, its scaled 8-bit value and the read latency (one cycle per
// converted tile, one per skipped column tile) are compared.
module tb_xbar_array;
  import imt_pkg::*;
  localparam int R1 = 128, C1 = 192, R2 = 64, C2 = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // DUT 1: row-major
  logic wr1, st1, b1, d1; logic [15:0] seg1, ts1, tr1;
  act_t wd1 [XB]; act_t x1 [R1]; logic en1 [C1]; acc_t y1 [C1]; act_t q1 [C1];
  xbar_array #(.R(R1), .C(C1), .COL_MAJOR(0), .SHIFT(4)) dut1 (
    .clk, .rst_n, .wr_en(wr1), .wr_seg(seg1), .wr_tsel(ts1), .wr_data(wd1),
    .start(st1), .x(x1), .col_en(en1), .busy(b1), .done(d1), .y(y1), .q(q1), .tiles_read(tr1));
  // DUT 2: column-major
  logic wr2, st2, b2, d2; logic [15:0] seg2, ts2, tr2;
  act_t wd2 [XB]; act_t x2 [R2]; logic en2 [C2]; acc_t y2 [C2]; act_t q2 [C2];
  xbar_array #(.R(R2), .C(C2), .COL_MAJOR(1), .SHIFT(0)) dut2 (
    .clk, .rst_n, .wr_en(wr2), .wr_seg(seg2), .wr_tsel(ts2), .wr_data(wd2),
    .start(st2), .x(x2), .col_en(en2), .busy(b2), .done(d2), .y(y2), .q(q2), .tiles_read(tr2));

  int w1 [R1][C1];
  int w2 [R2][C2];

  function automatic int sat(input longint v, input int sh);
    longint s; s = v >>> sh;
    if (s > 127) return 127; if (s < -128) return -128; return int'(s);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr1 = 0; st1 = 0; wr2 = 0; st2 = 0; seg1 = 0; ts1 = 0; seg2 = 0; ts2 = 0;
    foreach (x1[i]) x1[i] = 0; foreach (x2[i]) x2[i] = 0;
    foreach (en1[i]) en1[i] = 1; foreach (en2[i]) en2[i] = 1;
    foreach (wd1[i]) wd1[i] = 0; foreach (wd2[i]) wd2[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // program DUT 1 row by row
    for (int r = 0; r < R1; r++)
      for (int ct = 0; ct < C1/XB; ct++) begin
        for (int k = 0; k < XB; k++) begin w1[r][ct*XB+k] = $urandom_range(0, 255) - 128; wd1[k] = act_t'(w1[r][ct*XB+k]); end
        seg1 = 16'(r); ts1 = 16'(ct); wr1 = 1; @(posedge clk); #1; wr1 = 0;
      end
    // program DUT 2 column by column
    for (int c = 0; c < C2; c++) begin
      for (int k = 0; k < XB; k++) begin w2[k][c] = $urandom_range(0, 255) - 128; wd2[k] = act_t'(w2[k][c]); end
      seg2 = 16'(c); ts2 = 0; wr2 = 1; @(posedge clk); #1; wr2 = 0;
    end
    for (int trial = 0; trial < 6; trial++) begin
      int exp_cyc, cyc, act_ct;
      longint ref1;
      int xs1 [R1];
      foreach (x1[i]) begin xs1[i] = $urandom_range(0, 255) - 128; x1[i] = act_t'(xs1[i]); end
      foreach (en1[j]) en1[j] = (trial == 0) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      if (trial >= 2) for (int j = 64; j < 128; j++) en1[j] = 1'b0;   // column tile 1 off
      exp_cyc = 0; act_ct = 0;
      for (int ct = 0; ct < C1/XB; ct++) begin
        bit a; a = 0;
        for (int j = 0; j < XB; j++) a |= en1[ct*XB+j];
        exp_cyc += a ? R1/XB : 1; act_ct += a ? R1/XB : 0;
      end
      @(negedge clk); st1 = 1; @(posedge clk); #1; st1 = 0;
      foreach (x1[i]) x1[i] = 0;   // inputs are captured at start
      cyc = 0;
      while (!d1) begin @(posedge clk); #1; cyc++; end
      check(cyc == exp_cyc, $sformatf("dut1 latency %0d expected %0d", cyc, exp_cyc));
      check(int'(tr1) == act_ct, $sformatf("dut1 tiles_read %0d expected %0d", tr1, act_ct));
      for (int j = 0; j < C1; j++) begin
        ref1 = 0;
        if (en1[j]) for (int i = 0; i < R1; i++) ref1 += longint'(xs1[i]) * w1[i][j];
        check(longint'(y1[j]) == ref1, $sformatf("dut1 y[%0d]=%0d expected %0d", j, y1[j], ref1));
        check(int'(q1[j]) == sat(ref1, 4), $sformatf("dut1 q[%0d]", j));
      end
    end
    for (int trial = 0; trial < 4; trial++) begin
      longint ref2;
      int xs [R2];
      foreach (x2[i]) begin xs[i] = $urandom_range(0, 255) - 128; x2[i] = act_t'(xs[i]); end
      foreach (en2[j]) en2[j] = 1'($urandom_range(0, 1));
      @(negedge clk); st2 = 1; @(posedge clk); #1; st2 = 0;
      while (!d2) begin @(posedge clk); #1; end
      for (int j = 0; j < C2; j++) begin
        ref2 = 0;
        if (en2[j]) for (int i = 0; i < R2; i++) ref2 += longint'(xs[i]) * w2[i][j];
        check(longint'(y2[j]) == ref2, $sformatf("dut2 y[%0d]=%0d expected %0d", j, y2[j], ref2));
        check(int'(q2[j]) == sat(ref2, 0), $sformatf("dut2 q[%0d]", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

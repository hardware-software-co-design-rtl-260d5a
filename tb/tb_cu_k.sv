// tb_cu_k: writes random keys into a 64 x 128 key cache, one column per
// position, and checks the scores q.k_t >>> 3 (saturated) of enabled columns,
// zero for disabled ones, and that a disabled column tile is skipped.
module tb_cu_k;
  import imt_pkg::*;
  localparam int DK = 64, S = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic wr, st, busy, done; logic [15:0] pos, tiles; act_t key [DK]; act_t q [DK]; logic en [S]; act_t score [S];
  cu_k #(.D_K(DK), .SEQ_MAX(S)) dut (.clk, .rst_n, .wr_en(wr), .wr_pos(pos), .key, .start(st), .q, .col_en(en),
    .busy, .done, .score, .tiles_read(tiles));
  int kk [S][DK];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int qs [DK];
    wr = 0; st = 0; pos = 0; foreach (key[i]) key[i] = 0; foreach (q[i]) q[i] = 0; foreach (en[j]) en[j] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < S; t++) begin
      foreach (key[i]) begin kk[t][i] = $urandom_range(0, 60) - 30; key[i] = act_t'(kk[t][i]); end
      @(negedge clk); pos = 16'(t); wr = 1; @(negedge clk); wr = 0;
    end
    for (int trial = 0; trial < 6; trial++) begin
      foreach (q[i]) begin qs[i] = $urandom_range(0, 60) - 30; q[i] = act_t'(qs[i]); end
      foreach (en[j]) en[j] = (trial >= 3 && j >= 64) ? 1'b0 : 1'($urandom_range(0, 4) != 0);
      @(negedge clk); st = 1; @(posedge clk); #1; st = 0;
      while (!done) begin @(posedge clk); #1; end
      check(int'(tiles) == ((trial >= 3) ? 1 : 2), $sformatf("tiles converted %0d", tiles));
      for (int t = 0; t < S; t++) begin
        int d, e; d = 0;
        for (int i = 0; i < DK; i++) d += qs[i] * kk[t][i];
        e = d >>> 3; if (e > 127) e = 127; if (e < -128) e = -128;
        if (!en[t]) e = 0;
        check(int'(score[t]) == e, $sformatf("score[%0d]=%0d expected %0d", t, score[t], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aggregator_unit: programs W^O of a 2-head (2 x 64 -> 128) aggregator and
// checks that it concatenates the head outputs in head order and projects them:
// y = sat(W^O [a_0; a_1] >>> 7).
module tb_aggregator_unit;
  import imt_pkg::*;
  localparam int NH = 2, DK = 64, DM = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic wr, st, busy, done; logic [15:0] seg, ts; act_t wd [XB]; act_t a [NH][DK]; act_t y [DM];
  aggregator_unit #(.N_HEADS(NH), .D_K(DK), .D_MODEL(DM)) dut (.clk, .rst_n, .wr_en(wr), .wr_seg(seg), .wr_tsel(ts),
    .wr_data(wd), .start(st), .a, .busy, .done, .y);
  int w [NH*DK][DM];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int as [NH*DK];
    wr = 0; st = 0; seg = 0; ts = 0; foreach (wd[k]) wd[k] = 0;
    for (int h = 0; h < NH; h++) for (int j = 0; j < DK; j++) a[h][j] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < NH*DK; r++) for (int ct = 0; ct < DM/XB; ct++) begin
      for (int k = 0; k < XB; k++) begin w[r][ct*XB+k] = $urandom_range(0, 255) - 128; wd[k] = act_t'(w[r][ct*XB+k]); end
      @(negedge clk); seg = 16'(r); ts = 16'(ct); wr = 1; @(negedge clk); wr = 0;
    end
    for (int trial = 0; trial < 6; trial++) begin
      for (int h = 0; h < NH; h++) for (int j = 0; j < DK; j++) begin
        as[h*DK+j] = $urandom_range(0, 255) - 128; a[h][j] = act_t'(as[h*DK+j]);
      end
      @(negedge clk); st = 1; @(posedge clk); #1; st = 0;
      while (!done) begin @(posedge clk); #1; end
      for (int j = 0; j < DM; j++) begin
        int s, e; s = 0; for (int i = 0; i < NH*DK; i++) s += as[i] * w[i][j];
        e = s >>> 7; if (e > 127) e = 127; if (e < -128) e = -128;
        check(int'(y[j]) == e, $sformatf("y[%0d]=%0d expected %0d", j, y[j], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

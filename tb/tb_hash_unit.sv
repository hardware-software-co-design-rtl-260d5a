// tb_hash_unit: programs random hyperplanes into a 64 x 128 hashing unit and
// checks every signature bit against sign(x . r_b) computed in the bench, and
// that similar vectors share more signature bits than unrelated ones, and that
// a projection of exactly zero gives a 0 bit.
module tb_hash_unit;
  import imt_pkg::*;
  localparam int DK = 64, SW = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic wr, st, busy, done; logic [15:0] seg, ts; act_t wd [XB]; act_t x [DK]; logic [SW-1:0] sig;
  hash_unit #(.D_K(DK), .SIG_W(SW)) dut (.clk, .rst_n, .wr_en(wr), .wr_seg(seg), .wr_tsel(ts), .wr_data(wd),
    .start(st), .x, .busy, .done, .sig);
  int w [DK][SW];

  task automatic hash(input int xs [DK], output logic [SW-1:0] got, output logic [SW-1:0] expv);
    foreach (x[i]) x[i] = act_t'(xs[i]);
    @(negedge clk); st = 1; @(posedge clk); #1; st = 0;
    while (!done) begin @(posedge clk); #1; end
    got = sig;
    for (int b = 0; b < SW; b++) begin
      longint d; d = 0;
      for (int i = 0; i < DK; i++) d += longint'(xs[i]) * w[i][b];
      expv[b] = (d > 0);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a [DK], b2 [DK], c [DK];
    logic [SW-1:0] ga, ea, gb, eb, gc, ec;
    wr = 0; st = 0; seg = 0; ts = 0; foreach (wd[k]) wd[k] = 0; foreach (x[i]) x[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < DK; r++)
      for (int t = 0; t < SW/XB; t++) begin
        for (int k = 0; k < XB; k++) begin w[r][t*XB+k] = $urandom_range(0, 255) - 128; wd[k] = act_t'(w[r][t*XB+k]); end
        @(negedge clk); seg = 16'(r); ts = 16'(t); wr = 1; @(negedge clk); wr = 0;
      end
    for (int trial = 0; trial < 10; trial++) begin
      foreach (a[i]) begin a[i] = $urandom_range(0, 200) - 100; b2[i] = a[i] + $urandom_range(0, 10) - 5; c[i] = $urandom_range(0, 200) - 100; end
      hash(a, ga, ea); hash(b2, gb, eb); hash(c, gc, ec);
      check(ga == ea, "signature of a"); check(gb == eb, "signature of b"); check(gc == ec, "signature of c");
      check($countones(ga ^ gb) < $countones(ga ^ gc), "near vectors hash closer than unrelated ones");
    end
    // zero vector: every projection is exactly 0, which lies on no side of a
    // hyperplane and must give a 0 bit
    foreach (a[i]) a[i] = 0;
    hash(a, ga, ea);
    check(ga == '0 && ea == '0, "zero vector gives an all-zero signature");
    // a vector orthogonal to hyperplane 0: x = (w[1][0], -w[0][0], 0, ...)
    foreach (a[i]) a[i] = 0;
    a[0] = w[1][0]; a[1] = -w[0][0];
    hash(a, ga, ea);
    check(ga[0] == 1'b0, "projection exactly 0 gives bit 0");
    check(ga == ea, "signature of an orthogonal vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

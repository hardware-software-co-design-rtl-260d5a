// tb_norm_unit: checks residual addition and shift-based layer normalization
// on random vectors against a bench model (mean, variance, power-of-two
// standard deviation), plus one-cycle latency and that the output has
// roughly zero mean.
module tb_norm_unit;
  import imt_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic st, done; act_t x [D], r [D], y [D];
  norm_unit #(.D(D)) dut (.clk, .rst_n, .start(st), .x, .r, .done, .y);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    st = 0; foreach (x[i]) begin x[i] = 0; r[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      int s [D]; int sum, mean, v, k, ysum, amp;
      amp = (trial % 3 == 0) ? 4 : 100;
      foreach (x[i]) begin x[i] = act_t'($urandom_range(0, 2*amp) - amp); r[i] = act_t'($urandom_range(0, 2*amp) - amp); end
      sum = 0; foreach (x[i]) begin s[i] = int'(x[i]) + int'(r[i]); sum += s[i]; end
      mean = sum >>> 6;
      v = 0; foreach (x[i]) v += (s[i] - mean) * (s[i] - mean);
      v = v >>> 6;
      k = 0; while ((1 << (2*(k+1))) <= v) k++;   // largest k with 4^k <= v
      @(negedge clk); st = 1; @(posedge clk); #1; st = 0;
      check(done, "done one cycle after start");
      ysum = 0;
      foreach (y[i]) begin
        int e; e = ((s[i] - mean) * 16) >>> k; if (e > 127) e = 127; if (e < -128) e = -128;
        check(int'(y[i]) == e, $sformatf("trial %0d y[%0d]=%0d expected %0d", trial, i, y[i], e));
        ysum += int'(y[i]);
      end
      check(ysum / D <= 16 && ysum / D >= -16, "output mean near zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

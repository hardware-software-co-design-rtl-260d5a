// tb_softmax_lut: compares the softmax unit with a floating-point softmax of
// the enabled scores (scores carry three fractional bits, outputs are in units
// of 1/127) within one unit of rounding, and checks the one-cycle latency,
// zero output for disabled positions and the all-disabled case.
module tb_softmax_lut;
  import imt_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic vin, vout; act_t s [N]; logic en [N]; act_t p [N];
  softmax_lut #(.N(N)) dut (.clk, .rst_n, .valid_in(vin), .s, .en, .valid_out(vout), .p);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vin = 0; foreach (s[j]) begin s[j] = 0; en[j] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      real e [N]; real sum; int spread;
      spread = (trial % 4 == 0) ? 255 : (trial % 4 == 1) ? 40 : 16;
      foreach (s[j]) begin
        s[j]  = act_t'($urandom_range(0, spread) - spread/2);
        en[j] = (trial == 39) ? 1'b0 : 1'($urandom_range(0, 3) != 0);
      end
      @(negedge clk); vin = 1; @(posedge clk); #1; vin = 0;
      check(vout == 1'b1, "valid one cycle after input");
      sum = 0.0;
      foreach (s[j]) begin e[j] = en[j] ? $exp(real'(s[j]) / 8.0) : 0.0; sum += e[j]; end
      foreach (s[j]) begin
        int expv;
        expv = (sum > 0.0) ? int'(127.0 * e[j] / sum) : 0;   // rounds to nearest
        if (!en[j]) check(p[j] == 0, $sformatf("disabled p[%0d]=%0d", j, p[j]));
        else check(int'(p[j]) - expv <= 1 && expv - int'(p[j]) <= 1,
                   $sformatf("trial %0d p[%0d]=%0d expected %0d", trial, j, p[j], expv));
      end
      @(posedge clk); #1;
      check(vout == 1'b0, "valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_attn_selector: checks the attention selector against the example
// patterns of a 64-bit register (32 columns), written out as bit strings
// (leftmost character = bit 0 = column 0), and checks the rotation: after t
// shifts column j must show the initial bit (j - t) mod 64. Also checks a
// default 128-bit/64-column instance against a 64-column strided pattern.
module tb_attn_selector;
  import imt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic load, shift; pattern_e pat; logic [7:0] stride, window;
  logic en32 [32]; logic [63:0] reg32;
  attn_selector #(.COLS(32)) dut (.clk, .rst_n, .load, .pattern(pat), .stride, .window, .shift, .col_en(en32), .sel_reg(reg32));
  logic en64 [64]; logic [127:0] reg64;
  attn_selector dut64 (.clk, .rst_n, .load, .pattern(pat), .stride, .window, .shift, .col_en(en64), .sel_reg(reg64));

  function automatic logic [63:0] from_str(input string s);
    logic [63:0] v;
    for (int b = 0; b < 64; b++) v[b] = (s[b] == "1");
    return v;
  endfunction

  task automatic run(input pattern_e p, input int c, input int w, input string s, input string name);
    logic [63:0] init;
    init = from_str(s);
    @(negedge clk); pat = p; stride = 8'(c); window = 8'(w); load = 1;
    @(negedge clk); load = 0;
    check(reg32 == init, $sformatf("%s initial pattern %h expected %h", name, reg32, init));
    for (int t = 1; t <= 70; t++) begin
      @(negedge clk); shift = 1; @(negedge clk); shift = 0;
      for (int j = 0; j < 32; j++)
        check(en32[j] == init[(j - t + 640) % 64], $sformatf("%s t=%0d col %0d", name, t, j));
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; shift = 0; pat = PAT_FULL; stride = 4; window = 8;
    repeat (2) @(posedge clk); rst_n = 1;
    run(PAT_FULL, 4, 8,    "1111111111111111111111111111111111111111111111111111111111111111", "full");
    run(PAT_STRIDED, 4, 8, "1000100010001000100010001000100010001000100010001000100010001000", "strided");
    run(PAT_SLIDING, 4, 8, "1111111100000000000000000000000000000000000000000000000001111111", "sliding");
    run(PAT_DILATED, 4, 8, "1010101000000000000000000000000000000000000000000000000000101010", "dilated");
    run(PAT_GLOBAL_SLIDING, 16, 8,
                           "1111111100000000100000000000000010000000000000001000000001111111", "global+sliding");
    // 128-bit register, strided by 8
    @(negedge clk); pat = PAT_STRIDED; stride = 8; load = 1; @(negedge clk); load = 0;
    for (int b = 0; b < 128; b++) check(reg64[b] == (b % 8 == 0), $sformatf("128-bit strided bit %0d", b));
    for (int j = 0; j < 64; j++) check(en64[j] == (j % 8 == 0), "64-column enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sparsity_unit: writes random signatures into a 128-entry CAM and checks
// each search: Hamming distance of every entry to the key, the match flags
// (valid and distance <= threshold), the N/64-cycle search time and that clear
// invalidates all entries.
module tb_sparsity_unit;
  import imt_pkg::*;
  localparam int N = 128, SW = 96;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clear, wr, search, busy, done; logic [15:0] idx, th; logic [SW-1:0] wsig, key;
  logic match [N]; logic [15:0] hdist [N];
  sparsity_unit #(.N(N), .SIG_W(SW)) dut (.clk, .rst_n, .clear, .wr_en(wr), .wr_idx(idx), .wr_sig(wsig),
    .search, .key, .thresh(th), .busy, .done, .match, .hdist);
  logic [SW-1:0] store [N];
  int nvalid;

  function automatic logic [SW-1:0] rnd();
    logic [SW-1:0] v; for (int b = 0; b < SW; b++) v[b] = 1'($urandom_range(0, 1)); return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; wr = 0; search = 0; idx = 0; th = 0; wsig = 0; key = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    nvalid = 100;
    for (int t = 0; t < nvalid; t++) begin
      store[t] = rnd(); @(negedge clk); idx = 16'(t); wsig = store[t]; wr = 1; @(negedge clk); wr = 0;
    end
    for (int trial = 0; trial < 8; trial++) begin
      int cyc;
      key = (trial % 2) ? rnd() : store[trial * 7];
      for (int b = 0; b < 12; b++) if (trial % 2 == 0 && b < trial) key[b * 5] = ~key[b * 5];
      th  = 16'(40 + trial);
      @(negedge clk); search = 1; @(posedge clk); #1; search = 0; cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      check(cyc == N / 64, $sformatf("search time %0d cycles", cyc));
      for (int t = 0; t < N; t++) begin
        int hd; hd = (t < nvalid) ? $countones(store[t] ^ key) : 0;
        if (t < nvalid) check(int'(hdist[t]) == hd, $sformatf("distance of entry %0d", t));
        check(match[t] == (t < nvalid && hd <= int'(th)), $sformatf("match of entry %0d", t));
      end
      if (trial % 2 == 0) check(match[trial * 7], "entry equal to the key up to a few bits matches");
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    @(negedge clk); th = 16'(SW); search = 1; @(posedge clk); #1; search = 0;
    while (!done) begin @(posedge clk); #1; end
    for (int t = 0; t < N; t++) check(!match[t], "no match after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

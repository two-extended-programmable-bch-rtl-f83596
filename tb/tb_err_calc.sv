// Testbench for err_calc. Random reliabilities for the 2t+p = 6 sorted bits;
// a candidate stream of 2^p = 4 entries per word with b in Gray order and a
// random binary flag and pattern on each, sometimes with idle cycles in
// between. The reference weight of a candidate is the sum of the
// reliabilities of its pattern bits and of its b bits; the unit must report
// the binary candidate of least weight (the first one on ties), or none,
// with `done` the cycle after c_last.
module tb_err_calc;
  localparam int T = 2, P = 2, G = 2 * T, D = G + P;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, c_valid, c_binary, c_last, done, found;
  logic [5:0] rel [D];
  logic [G-1:0] c_gamma;
  logic [P-1:0] c_b;
  logic [D-1:0] err_pattern;
  logic [8:0] min_weight;
  err_calc dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    start = 0; c_valid = 0; c_binary = 0; c_last = 0; c_gamma = 0; c_b = 0;
    foreach (rel[i]) rel[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 400; w++) begin
      bit rf; int rw; logic [D-1:0] rp;
      @(negedge clk);
      foreach (rel[i]) rel[i] = (w % 3 == 0) ? 6'($urandom_range(0, 3)) : 6'($urandom);
      start = 1;
      @(negedge clk) start = 0;
      rf = 0; rw = 0; rp = 0;
      for (int k = 0; k < 4; k++) begin
        int wt;
        while ($urandom_range(0, 3) == 0) begin c_valid = 0; @(negedge clk); end
        c_valid = 1; c_b = P'(k ^ (k >> 1)); c_gamma = G'($urandom);
        c_binary = ($urandom_range(0, 2) == 0); c_last = (k == 3);
        wt = 0;
        for (int i = 0; i < G; i++) if (c_gamma[i]) wt += rel[i];
        for (int i = 0; i < P; i++) if (c_b[i]) wt += rel[G+i];
        if (c_binary && (!rf || wt < rw)) begin rf = 1; rw = wt; rp = {c_b, c_gamma}; end
        @(negedge clk);
      end
      c_valid = 0; c_last = 0;
      chk(done, "done the cycle after c_last");
      chk(found == rf, $sformatf("word %0d found %b want %b", w, found, rf));
      if (rf) chk(min_weight == 9'(rw) && err_pattern == rp,
                  $sformatf("word %0d weight %0d pattern %b, want %0d %b", w, min_weight, err_pattern, rw, rp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for weight_errloc. Random reliabilities for the 2t+p = 6 sorted
// bits; a candidate stream of 2^(2t+p) = 64 entries per word, A in Gray
// order outside and Gamma in Gray order inside, as the heuristic search
// produces it. Each candidate is randomly a miss, a zero discrepancy or a
// geometric one (further error, random location). The reference weight is
// the sum of the reliabilities of the Gamma and A bits, plus 32 for a
// further error; the unit must keep the hit of least weight (the first on
// ties) with its pattern and further-error location, and pulse `done` the
// cycle after c_last.
module tb_weight_errloc;
  localparam int T = 2, P = 2, G = 2 * T, D = G + P;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, c_valid, c_hit, c_extra, c_last, done, found, extra_valid;
  logic [5:0] rel [D];
  logic [7:0] c_extra_loc, extra_loc;
  logic [G-1:0] c_gamma;
  logic [P-1:0] c_a;
  logic [D-1:0] err_pattern;
  logic [8:0] min_weight;
  weight_errloc dut (.*);
  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  int n_extra_best = 0;
  initial begin
    start = 0; c_valid = 0; c_hit = 0; c_extra = 0; c_last = 0; c_gamma = 0; c_a = 0; c_extra_loc = 0;
    foreach (rel[i]) rel[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      bit rf, rx; int rw, rl; logic [D-1:0] rp;
      @(negedge clk);
      foreach (rel[i]) rel[i] = (w % 3 == 0) ? 6'($urandom_range(0, 3)) : 6'($urandom);
      start = 1;
      @(negedge clk) start = 0;
      rf = 0; rw = 0; rp = 0; rx = 0; rl = 0;
      for (int k = 0; k < 64; k++) begin
        int wt, kind, ia, ig;
        ia = k >> G; ig = k % (1 << G);
        c_valid = 1; c_a = P'(ia ^ (ia >> 1)); c_gamma = G'(ig ^ (ig >> 1));
        kind = $urandom_range(0, 15);
        c_hit = (kind < 3); c_extra = (kind < 2); c_extra_loc = 8'($urandom);
        c_last = (k == 63);
        wt = c_extra ? 32 : 0;
        for (int i = 0; i < G; i++) if (c_gamma[i]) wt += rel[i];
        for (int i = 0; i < P; i++) if (c_a[i]) wt += rel[G+i];
        if (c_hit && (!rf || wt < rw)) begin
          rf = 1; rw = wt; rp = {c_a, c_gamma}; rx = c_extra; rl = c_extra ? c_extra_loc : 0;
        end
        @(negedge clk);
      end
      c_valid = 0; c_last = 0;
      if (rx) n_extra_best++;
      chk(done, "done the cycle after c_last");
      chk(found == rf, $sformatf("word %0d found %b want %b", w, found, rf));
      if (rf) chk(min_weight == 9'(rw) && err_pattern == rp && extra_valid == rx && extra_loc == 8'(rl),
                  $sformatf("word %0d weight %0d pattern %b extra %b %0d, want %0d %b %b %0d",
                            w, min_weight, err_pattern, extra_valid, extra_loc, rw, rp, rx, rl));
    end
    chk(n_extra_best > 0, "a further error won at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

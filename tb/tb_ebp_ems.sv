// Testbench for ebp_ems, the EBP error magnitude solver, on its own. Each
// case has six distinct random locators (the 2t sorted bits and p extra
// bits, as the evaluator would deliver them), random reliabilities, and the
// 2t syndromes S_1..S_4 of a random error pattern on those bits, sometimes
// with one error elsewhere or three (then usually no solution). A
// brute-force reference tries all 2^(2t+p) patterns; the unit must report
// the same success and minimum weight and a pattern whose syndromes cancel.
// `done` must come the same number of cycles after `start` every time, and
// the BP solver must report stalls.
module tb_ebp_ems;
  import tb_bch_pkg::*;
  localparam int T = 2, P = 2, G = 2 * T, D = G + P;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, done, found;
  logic [7:0] beta [D];
  logic [5:0] rel [D];
  logic [7:0] syn [G];
  logic [15:0] stall_cycles;
  logic [D-1:0] err_pattern;
  logic [8:0] min_weight;
  ebp_ems dut (.*);
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
  int n_found = 0, n_fail = 0, lat0 = -1;
  initial begin
    int cyc;
    tb_init();
    start = 0;
    foreach (beta[i]) beta[i] = 0;
    foreach (rel[i]) rel[i] = 0;
    foreach (syn[i]) syn[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 60; w++) begin
      int unsigned e [10];
      int unsigned s1, s3;
      bit dup, rf;
      int rw;
      logic [D-1:0] pat;
      @(negedge clk);
      do begin
        for (int i = 0; i < 10; i++) e[i] = $urandom_range(1, 255);
        dup = 0;
        for (int i = 0; i < 10; i++) for (int k = 0; k < i; k++) if (e[i] == e[k]) dup = 1;
      end while (dup);
      for (int i = 0; i < D; i++) begin beta[i] = 8'(e[i]); rel[i] = 6'($urandom_range(1, 20)); end
      pat = D'($urandom);
      s1 = 0; s3 = 0;
      for (int i = 0; i < D; i++) if (pat[i]) begin s1 ^= e[i]; s3 ^= rpow(e[i], 3); end
      if (w % 3 == 1) begin s1 ^= e[6]; s3 ^= rpow(e[6], 3); end
      if (w % 5 == 4) for (int i = 7; i < 10; i++) begin s1 ^= e[i]; s3 ^= rpow(e[i], 3); end
      syn[0] = 8'(s1); syn[1] = 8'(rmul(s1, s1)); syn[2] = 8'(s3); syn[3] = 8'(rpow(s1, 4));
      rf = 0; rw = 0;
      for (int q = 0; q < (1 << D); q++) begin
        int unsigned t1, t3;
        int wt;
        t1 = s1; t3 = s3; wt = 0;
        for (int i = 0; i < D; i++) if (q[i]) begin t1 ^= e[i]; t3 ^= rpow(e[i], 3); wt += rel[i]; end
        if (t1 == 0 && t3 == 0) begin if (!rf || wt < rw) begin rf = 1; rw = wt; end end
      end
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      if (lat0 < 0) lat0 = cyc;
      chk(cyc == lat0, $sformatf("done after %0d cycles, first case %0d", cyc, lat0));
      chk(stall_cycles != 0, "BP solver stalls counted");
      chk(found == rf, $sformatf("case %0d found %b want %b", w, found, rf));
      if (rf) begin
        int unsigned t1, t3;
        n_found++;
        chk(min_weight == 9'(rw), $sformatf("case %0d weight %0d want %0d", w, min_weight, rw));
        t1 = s1; t3 = s3;
        for (int i = 0; i < D; i++) if (err_pattern[i]) begin t1 ^= e[i]; t3 ^= rpow(e[i], 3); end
        chk(t1 == 0 && t3 == 0, $sformatf("case %0d reported pattern leaves syndromes", w));
      end else n_fail++;
    end
    $display("done %0d cycles after start; found %0d, failures %0d", lat0, n_found, n_fail);
    chk(n_found > 0 && n_fail > 0, "successes and failures occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

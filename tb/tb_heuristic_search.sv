// Testbench for heuristic_search. Six distinct random locators stand for the
// 2t least reliable bits (b_0..b_3) and the p extra bits (x_0, x_1). A random
// error pattern on them, sometimes with one further error elsewhere, gives
// the odd syndromes. The effective syndrome unit is modelled here: on each
// `adv` it steps A in Gray order and adds the extra locator's powers on the
// next edge. Every candidate is compared with a reference classification of
// Delta_odd = S_odd + sum A x + sum Gamma b: zero, geometric (with the
// further error's arrival index n-1-log(x)) or neither. All 2^(2t+p) = 64
// (Gamma, A) pairs must appear once, one per cycle, c_last on the last, the
// first one (t-1)*ceil(m/q) + 2 = 6 cycles after `start`, and the planted pattern
// must be among the hits.
module tb_heuristic_search;
  import tb_bch_pkg::*;
  localparam int T = 2, P = 2, G = 2 * T;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, adv, busy, c_valid, c_hit, c_extra, c_last;
  logic [7:0] bodd [G][T];
  logic [7:0] s_eff [T];
  logic [P-1:0] a_gray, c_a;
  logic [7:0] c_extra_loc;
  logic [G-1:0] c_gamma;
  heuristic_search dut (.*);
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
  int unsigned b [G];
  int unsigned xb [P];
  int unsigned s1, s3;
  // Model of the effective syndrome unit.
  logic load;
  always_ff @(posedge clk) begin
    if (load) begin
      a_gray <= '0; s_eff[0] <= 8'(s1); s_eff[1] <= 8'(s3);
    end else if (adv) begin
      logic [P-1:0] na;
      int fl;
      na = a_gray ^ ((~a_gray[0] ^ a_gray[1]) ? 2'b01 : 2'b10);
      fl = (na[0] != a_gray[0]) ? 0 : 1;
      a_gray <= na;
      s_eff[0] <= s_eff[0] ^ 8'(xb[fl]);
      s_eff[1] <= s_eff[1] ^ 8'(rpow(xb[fl], 3));
    end
  end
  int lat0 = -1, n_geo = 0, n_zero = 0;
  initial begin
    int cyc;
    tb_init();
    start = 0; load = 0; s1 = 0; s3 = 0;
    foreach (bodd[i, j]) bodd[i][j] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 100; w++) begin
      int unsigned e [8];
      bit seen [64];
      bit dup, planted_hit, further;
      int unsigned fx;
      logic [G-1:0] pg; logic [P-1:0] pa;
      @(negedge clk);
      do begin
        for (int i = 0; i < 8; i++) e[i] = $urandom_range(1, 255);
        dup = 0;
        for (int i = 0; i < 8; i++) for (int k = 0; k < i; k++) if (e[i] == e[k]) dup = 1;
      end while (dup);
      for (int i = 0; i < G; i++) b[i] = e[i];
      for (int i = 0; i < P; i++) xb[i] = e[G+i];
      for (int i = 0; i < G; i++) begin bodd[i][0] = 8'(b[i]); bodd[i][1] = 8'(rpow(b[i], 3)); end
      pg = G'($urandom); pa = P'($urandom);
      further = (w % 2 == 1); fx = e[7];
      s1 = 0; s3 = 0;
      for (int i = 0; i < G; i++) if (pg[i]) begin s1 ^= b[i]; s3 ^= rpow(b[i], 3); end
      for (int i = 0; i < P; i++) if (pa[i]) begin s1 ^= xb[i]; s3 ^= rpow(xb[i], 3); end
      if (further) begin s1 ^= fx; s3 ^= rpow(fx, 3); end
      foreach (seen[i]) seen[i] = 0;
      planted_hit = 0;
      load = 1;
      @(negedge clk) load = 0;
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!c_valid && cyc < 100) begin @(negedge clk); cyc++; end
      if (lat0 < 0) lat0 = cyc;
      chk(cyc == lat0 && cyc == (T - 1) * 4 + 2, $sformatf("first candidate after %0d cycles", cyc));
      for (int k = 0; k < 64; k++) begin
        int unsigned d1, d3;
        bit z, geo;
        chk(c_valid, "one candidate per cycle");
        chk(!seen[{c_a, c_gamma}], "each pair once");
        seen[{c_a, c_gamma}] = 1;
        d1 = s1; d3 = s3;
        for (int i = 0; i < G; i++) if (c_gamma[i]) begin d1 ^= b[i]; d3 ^= rpow(b[i], 3); end
        for (int i = 0; i < P; i++) if (c_a[i]) begin d1 ^= xb[i]; d3 ^= rpow(xb[i], 3); end
        z = (d1 == 0 && d3 == 0);
        geo = (d1 != 0 && d3 == rpow(d1, 3));
        chk(c_hit == (z || geo) && c_extra == geo,
            $sformatf("word %0d G=%b A=%b hit %b extra %b want %b %b", w, c_gamma, c_a, c_hit, c_extra, z || geo, geo));
        if (geo) begin
          n_geo++;
          chk(c_extra_loc == 8'((254 - int'(log_t[d1])) % 255), "further error location");
        end
        if (z) n_zero++;
        if (c_gamma == pg && c_a == pa) planted_hit = c_hit && (c_extra == further);
        chk(c_last == (k == 63), "c_last");
        @(negedge clk);
      end
      chk(!c_valid, "stream ends");
      chk(planted_hit, "planted pattern found");
    end
    chk(n_geo > 0 && n_zero > 0, "both kinds of hit seen");
    $display("first candidate %0d cycles after start; %0d zero and %0d geometric hits", lat0, n_zero, n_geo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

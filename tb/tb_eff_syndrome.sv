// Testbench for eff_syndrome. For random odd syndromes and extra locators
// the unit is started, must raise `ready` once the odd incremental syndromes
// are known (P + (T-1)*ceil(m/q) + 2 = 8 cycles, set by its power-sum
// chain), and then, for each of 2^p - 1 `adv` pulses (at random spacing),
// step A through the Gray sequence 00, 01, 11, 10 with
// S_eff = S_odd + sum a_i (b_i, b_i^3) on the following edge.
module tb_eff_syndrome;
  import tb_bch_pkg::*;
  localparam int T = 2, P = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, adv, ready;
  logic [7:0] syn_odd [T];
  logic [7:0] beta_x [P];
  logic [P-1:0] a_gray;
  logic [7:0] s_eff [T];
  eff_syndrome dut (.*);
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
  int lat0 = -1;
  initial begin
    int cyc;
    tb_init();
    start = 0; adv = 0;
    foreach (syn_odd[i]) syn_odd[i] = 0;
    foreach (beta_x[i]) beta_x[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      @(negedge clk);
      foreach (syn_odd[i]) syn_odd[i] = 8'($urandom);
      foreach (beta_x[i]) beta_x[i] = 8'($urandom_range(1, 255));
      start = 1;
      @(negedge clk) start = 0;
      chk(a_gray == 0 && s_eff[0] == syn_odd[0] && s_eff[1] == syn_odd[1], "start loads S_odd, A = 0");
      cyc = 1;
      while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
      if (lat0 < 0) lat0 = cyc;
      chk(cyc == lat0 && cyc == P + 4 + 2, $sformatf("ready after %0d cycles", cyc));
      for (int k = 1; k < 4; k++) begin
        logic [P-1:0] g;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        adv = 1;
        @(negedge clk) adv = 0;
        g = P'(k ^ (k >> 1));
        chk(a_gray == g, $sformatf("A = %b want %b", a_gray, g));
        for (int s = 0; s < T; s++) begin
          int unsigned v;
          v = syn_odd[s];
          for (int i = 0; i < P; i++) if (g[i]) v ^= rpow(beta_x[i], 2 * s + 1);
          chk(s_eff[s] == 8'(v), $sformatf("word %0d A=%b S_eff[%0d]=%h want %h", w, g, s, s_eff[s], v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for bp_solver. For random distinct nonzero locators b_0..b_3 and
// random magnitudes g, the right-hand side s_j = sum_i g_i b_i^j (j = 1..4)
// is formed from tables; the solver must return x = g. Each word runs the
// inverse-table precompute once and then three solves (as the decoder does
// for p = 2). The precompute and solve cycle counts and the stall count per
// solve must be the same for every word, and stalls must occur.
module tb_bp_solver;
  import tb_bch_pkg::*;
  localparam int NN = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pre_start, pre_done, solve_start, solve_done;
  logic [7:0] beta [NN];
  logic [7:0] rhs [NN];
  logic [7:0] x [NN];
  logic [15:0] stall_cycles;
  bp_solver dut (.*);
  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  int pre_lat0 = -1, sol_lat0 = -1, st0 = -1;
  initial begin
    int cyc, st_before;
    int unsigned g [NN];
    tb_init();
    pre_start = 0; solve_start = 0;
    foreach (beta[i]) beta[i] = 0;
    foreach (rhs[i]) rhs[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 60; w++) begin
      bit dup;
      @(negedge clk);
      do begin
        foreach (beta[i]) beta[i] = 8'($urandom_range(1, 255));
        dup = 0;
        for (int i = 0; i < NN; i++) for (int k = 0; k < i; k++) if (beta[i] == beta[k]) dup = 1;
      end while (dup);
      pre_start = 1;
      @(negedge clk) pre_start = 0;
      cyc = 1;
      while (!pre_done && cyc < 1000) begin @(negedge clk); cyc++; end
      if (pre_lat0 < 0) pre_lat0 = cyc;
      chk(cyc == pre_lat0, $sformatf("precompute cycles %0d vs %0d", cyc, pre_lat0));
      for (int s = 0; s < 3; s++) begin
        foreach (g[i]) g[i] = (s == 0 && w % 4 == 0) ? $urandom_range(0, 1) : $urandom_range(0, 255);
        for (int j = 1; j <= NN; j++) begin
          int unsigned v;
          v = 0;
          for (int i = 0; i < NN; i++) v ^= rmul(g[i], rpow(beta[i], j));
          rhs[j-1] = 8'(v);
        end
        st_before = stall_cycles;
        solve_start = 1;
        @(negedge clk) solve_start = 0;
        cyc = 1;
        while (!solve_done && cyc < 1000) begin @(negedge clk); cyc++; end
        if (sol_lat0 < 0) sol_lat0 = cyc;
        chk(cyc == sol_lat0, $sformatf("solve cycles %0d vs %0d", cyc, sol_lat0));
        if (st0 < 0) st0 = 16'(stall_cycles - 16'(st_before));
        chk(16'(stall_cycles - 16'(st_before)) == 16'(st0) && st0 > 0, "stall cycles per solve");
        for (int i = 0; i < NN; i++)
          chk(x[i] == 8'(g[i]), $sformatf("word %0d solve %0d g_%0d = %h want %h", w, s, i, x[i], g[i]));
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("precompute %0d cycles, solve %0d cycles, %0d stall cycles per solve", pre_lat0, sol_lat0, st0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

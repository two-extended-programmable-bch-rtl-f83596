// Testbench for incr_syndrome. For random pairs of extra locators beta_x the
// unit must return dS[i][j] = beta_x[i]^(j+1), j = 0..2t-1, matching table
// powers, and pulse `done` P*(2T-1)*(ceil(m/q)+1) + 1 = 31 cycles after
// `start` (one power-sum result at a time, each waited for).
module tb_incr_syndrome;
  import tb_bch_pkg::*;
  localparam int P = 2, T = 2, LAT = P * (2 * T - 1) * 5 + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, done;
  logic [7:0] beta_x [P];
  logic [7:0] ds [P][2*T];
  incr_syndrome dut (.*);
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
    int cyc;
    tb_init();
    start = 0;
    foreach (beta_x[i]) beta_x[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 100; w++) begin
      @(negedge clk);
      foreach (beta_x[i]) beta_x[i] = 8'($urandom_range(1, 255));
      if (w % 9 == 3) beta_x[0] = 1;
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      chk(cyc == LAT, $sformatf("latency %0d, want %0d", cyc, LAT));
      for (int i = 0; i < P; i++)
        for (int j = 0; j < 2 * T; j++)
          chk(ds[i][j] == 8'(rpow(beta_x[i], j + 1)),
              $sformatf("beta %h power %0d: %h want %h", beta_x[i], j+1, ds[i][j], rpow(beta_x[i], j+1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

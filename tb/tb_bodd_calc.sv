// Testbench for bodd_calc. For random sets of 2t = 4 field elements (zero and
// one included now and then) the unit must return x, x^3 for each, equal to
// table powers, and pulse `done` NE + (T-1)*ceil(m/q) + 1 = 9 cycles after
// `start`. Results must stay put until the next start.
module tb_bodd_calc;
  import tb_bch_pkg::*;
  localparam int NE = 4, T = 2, LAT = NE + (T - 1) * 4 + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, done;
  logic [7:0] x [NE];
  logic [7:0] pw [NE][T];
  bodd_calc #(.NE(NE)) dut (.*);
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
    foreach (x[i]) x[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      @(negedge clk);
      foreach (x[i]) x[i] = 8'($urandom);
      if (w % 10 == 1) x[w % NE] = 0;
      if (w % 10 == 2) x[w % NE] = 1;
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      chk(cyc == LAT, $sformatf("latency %0d, want %0d", cyc, LAT));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int e = 0; e < NE; e++)
        for (int s = 0; s < T; s++)
          chk(pw[e][s] == 8'(rpow(x[e], 2 * s + 1)),
              $sformatf("x=%h power %0d: %h want %h", x[e], 2*s+1, pw[e][s], rpow(x[e], 2*s+1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for binary_check. Solutions G_1, G_2 are random; G_0 is built as
// D + b_1 G_1 + b_2 G_2 for a random binary vector D and a random b, so that
// at least one combination is binary (sometimes D is not binary, so none
// may be). The unit must emit the 2^p = 4 combinations in Gray order of b,
// one per cycle starting the cycle after `start`, each flagged binary
// exactly when every entry of G_0 + sum b_i G_i is 0 or 1, with those
// entries' low bits as the pattern, and c_last on the fourth.
module tb_binary_check;
  localparam int T = 2, P = 2, G = 2 * T;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, c_valid, c_binary, c_last;
  logic [7:0] gam [P+1][G];
  logic [G-1:0] c_gamma;
  logic [P-1:0] c_b;
  binary_check dut (.*);
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
  int nbin = 0;
  initial begin
    start = 0;
    foreach (gam[i, j]) gam[i][j] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 300; w++) begin
      int bsel;
      @(negedge clk);
      bsel = $urandom_range(0, 3);
      for (int j = 0; j < G; j++) begin
        logic [7:0] d;
        d = (w % 5 == 4) ? 8'($urandom) : 8'($urandom_range(0, 1));
        gam[1][j] = (w % 7 == 0) ? 8'($urandom_range(0, 1)) : 8'($urandom);
        gam[2][j] = 8'($urandom);
        gam[0][j] = d ^ (bsel[0] ? gam[1][j] : 8'h0) ^ (bsel[1] ? gam[2][j] : 8'h0);
      end
      start = 1;
      @(negedge clk) start = 0;
      for (int k = 0; k < 4; k++) begin
        logic [P-1:0] b;
        logic [7:0] dd [G];
        bit bin;
        b = P'(k ^ (k >> 1));
        bin = 1;
        for (int j = 0; j < G; j++) begin
          dd[j] = gam[0][j] ^ (b[0] ? gam[1][j] : 8'h0) ^ (b[1] ? gam[2][j] : 8'h0);
          if (dd[j] > 1) bin = 0;
        end
        chk(c_valid, $sformatf("word %0d candidate %0d valid", w, k));
        chk(c_b == b, $sformatf("word %0d candidate %0d b=%b want %b", w, k, c_b, b));
        chk(c_binary == bin, $sformatf("word %0d b=%b binary=%b want %b", w, b, c_binary, bin));
        if (bin) begin
          nbin++;
          for (int j = 0; j < G; j++) chk(c_gamma[j] == dd[j][0], "pattern bit");
        end
        chk(c_last == (k == 3), "c_last");
        @(negedge clk);
      end
      chk(!c_valid, "stream ends after 2^p candidates");
    end
    chk(nbin > 0, "binary combinations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

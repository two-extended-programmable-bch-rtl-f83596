// Testbench for gf_inverse: the pipelined inversion unit (A^254 by seven chained power-sum stages). A new
// random operand pair with a tag is issued on most cycles (gaps are random);
// every product must come out exactly (m-1)*ceil(m/q) = 28 cycles after it went in,
// in order, with its tag, and equal the table inverse (0 maps to 0).
module tb_gf_inverse;
  import tb_bch_pkg::*;
  localparam int LAT = 28;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [7:0] a, y;
  logic [11:0] tag_in, tag_out;
  gf_inverse #(.TAG_W(12)) dut (.*);
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int unsigned exp_c [$];
  int          exp_t [$];
  int          exp_cyc [$];
  int          cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      checks += 2;
      if (exp_c.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        int unsigned e; int t, ic;
        e = exp_c.pop_front(); t = exp_t.pop_front(); ic = exp_cyc.pop_front();
        if (y != 8'(e) || tag_out != 12'(t)) begin
          failures++; $display("FAIL: got %h tag %0d, want %h tag %0d", y, tag_out, e, t);
        end
        if (cyc - ic != LAT) begin failures++; $display("FAIL: latency %0d", cyc - ic); end
      end
    end
  end
  initial begin
    tb_init();
    in_valid = 0; a = 0; tag_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      a = 8'($urandom);
      if (i % 50 == 0) a = 0;
      if (i % 37 == 0) a = 1;
      tag_in = 12'(i);
      if (in_valid) begin
        exp_c.push_back(a == 0 ? 0 : rinv(a)); exp_t.push_back(i); exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_c.size() != 0) begin failures++; $display("FAIL: %0d inverses missing", exp_c.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

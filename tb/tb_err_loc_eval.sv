// Testbench for err_loc_eval, the error locator evaluator. Words of n = 255
// reliabilities are streamed in (random values, many ties, random idle
// gaps). After the last bit the unit must hold the D = 6 smallest
// reliabilities in ascending order, each with its arrival index (ties: the
// earlier bit first) and its locator alpha^(n-1-index); `done` must pulse on
// the cycle after the last bit and `count` must equal n. The reference is a
// plain stable selection over the stored word.
module tb_err_loc_eval;
  import tb_bch_pkg::*;
  localparam int D = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_first, done;
  logic [5:0] rel_in;
  logic [7:0] count;
  logic [5:0] rel [D];
  logic [7:0] loc [D];
  logic [7:0] beta [D];
  err_loc_eval dut (.*);
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
  int unsigned r [255];
  int done_seen;
  initial begin
    tb_init();
    in_valid = 0; in_first = 0; rel_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 16; w++) begin
      bit used [255];
      foreach (r[i]) r[i] = (w % 3 == 0) ? $urandom_range(0, 7) : $urandom_range(0, 63);
      for (int i = 0; i < 255; i++) begin
        while (w % 2 == 1 && $urandom_range(0, 4) == 0) begin
          @(negedge clk) in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); rel_in = 6'(r[i]);
      end
      @(negedge clk) in_valid = 0;
      done_seen = done;
      chk(done_seen == 1, "done one cycle after last bit");
      chk(count == 8'd255, "count equals n");
      foreach (used[i]) used[i] = 0;
      for (int s = 0; s < D; s++) begin
        int best;
        best = -1;
        for (int a = 0; a < 255; a++) if (!used[a] && (best < 0 || r[a] < r[best])) best = a;
        used[best] = 1;
        chk(rel[s] == 6'(r[best]) && loc[s] == 8'(best) && beta[s] == 8'(alpha(254 - best)),
            $sformatf("word %0d slot %0d: rel %0d loc %0d beta %h, want %0d %0d %h",
                      w, s, rel[s], loc[s], beta[s], r[best], best, alpha(254 - best)));
      end
      @(negedge clk);
      chk(done == 0, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for syndrome_calc. Two instances run on the same bit stream: one
// computing all 2t = 4 syndromes S_1..S_4, one only the odd ones S_1, S_3.
// Words are random codewords with 0 to 3 bit errors, sent highest-order
// coefficient first, with random idle gaps between bits. Each syndrome must
// equal r(alpha^j) evaluated from tables, and be ready on the cycle after
// the last bit (one cycle per bit, no extra latency). Codewords must give
// zero syndromes. Back-to-back words check that `in_first` restarts.
module tb_syndrome_calc;
  import tb_bch_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_valid, in_first, data_in;
  logic [7:0] syn_all [4];
  logic [7:0] syn_odd [2];
  syndrome_calc #(.NS(4), .ODD(1'b0)) u_all (.clk, .rst, .in_valid, .in_first, .data_in, .syn(syn_all));
  syndrome_calc #(.NS(2), .ODD(1'b1)) u_odd (.clk, .rst, .in_valid, .in_first, .data_in, .syn(syn_odd));
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
  bit msg [239];
  bit cw [255];
  initial begin
    tb_init();
    in_valid = 0; in_first = 0; data_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 20; w++) begin
      foreach (msg[i]) msg[i] = 1'($urandom);
      encode(msg, cw);
      for (int e = 0; e < w % 4; e++) cw[$urandom_range(0, 254)] ^= 1'b1;
      for (int i = 254; i >= 0; i--) begin
        while (w % 2 == 1 && $urandom_range(0, 3) == 0) begin
          @(negedge clk) in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; in_first = (i == 254); data_in = cw[i];
      end
      @(negedge clk) in_valid = 0;
      for (int j = 1; j <= 4; j++)
        chk(syn_all[j-1] == 8'(syn(cw, j)), $sformatf("word %0d S_%0d = %h want %h", w, j, syn_all[j-1], syn(cw, j)));
      for (int j = 0; j < 2; j++)
        chk(syn_odd[j] == 8'(syn(cw, 2*j+1)), $sformatf("word %0d odd S_%0d", w, 2*j+1));
      if (w % 4 == 0) chk(syn_all[0] == 0 && syn_all[2] == 0, "codeword has zero syndromes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for gf_adder: field addition is bitwise XOR. Random operand pairs
// are checked against a + b computed as integer XOR, plus the identities
// a + a = 0 and a + 0 = a. Combinational, no latency.
module tb_gf_adder;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c;
  gf_adder dut (.a(a), .b(b), .c(c));
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      int unsigned ra, rb;
      ra = $urandom_range(0, 255);
      rb = (i % 5 == 0) ? ra : (i % 7 == 0) ? 0 : $urandom_range(0, 255);
      a = 8'(ra); b = 8'(rb);
      #1;
      checks++;
      if (c != 8'(ra ^ rb)) begin failures++; $display("FAIL %h+%h=%h", ra, rb, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

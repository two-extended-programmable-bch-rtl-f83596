// Testbench for gf_const_mult: multiplication by fixed powers of alpha in
// GF(2^8) (field polynomial x^8+x^6+x^5+x^4+1). Three instances (alpha^1,
// alpha^3, alpha^-1) are fed random and exhaustive operands and compared with
// products formed from exp/log tables. Purely combinational, so no latency.
module tb_gf_const_mult;
  import tb_bch_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, y1, y3, ym;
  gf_const_mult #(.E(1))  u1 (.x(x), .y(y1));
  gf_const_mult #(.E(3))  u3 (.x(x), .y(y3));
  gf_const_mult #(.E(-1)) um (.x(x), .y(ym));
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(int unsigned v);
    x = 8'(v);
    #1;
    checks += 3;
    if (y1 != 8'(rmul(v, alpha(1))))  begin failures++; $display("FAIL x=%h a^1 -> %h", v, y1); end
    if (y3 != 8'(rmul(v, alpha(3))))  begin failures++; $display("FAIL x=%h a^3 -> %h", v, y3); end
    if (ym != 8'(rmul(v, alpha(-1)))) begin failures++; $display("FAIL x=%h a^-1 -> %h", v, ym); end
  endtask
  initial begin
    tb_init();
    for (int v = 0; v < 256; v++) chk(v);
    repeat (200) chk($urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bch_pkg: reference models shared by the testbenches.
//
// Field arithmetic uses exponent/logarithm tables (built by tb_init from the
// field polynomial 0x171), a different method from the shift-and-reduce
// logic of the design. Also provides a systematic BCH(255,239) encoder for
// g(x) = 1+x^2+x^3+x^5+x^6+x^7+x^8+x^10+x^11+x^15+x^16 and a brute-force
// reference of both soft decoding rules over the 2t+p least reliable bits.
package tb_bch_pkg;

  int unsigned exp_t [512];
  int unsigned log_t [256];

  function automatic void tb_init();
    int unsigned v;
    v = 1;
    for (int e = 0; e < 255; e++) begin
      exp_t[e]       = v;
      exp_t[e + 255] = v;
      log_t[v]       = e;
      v = v << 1;
      if (v & 'h100) v = v ^ 'h171;
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
    log_t[0]   = 0;
  endfunction

  function automatic int unsigned rmul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int unsigned rpow(int unsigned a, int e);
    if (a == 0) return 0;
    return exp_t[(log_t[a] * e) % 255];
  endfunction

  function automatic int unsigned rinv(int unsigned a);
    return exp_t[(255 - log_t[a]) % 255];
  endfunction

  function automatic int unsigned alpha(int e);
    return exp_t[((e % 255) + 255) % 255];
  endfunction

  // Systematic encoder: cw[i] is the coefficient of x^i.
  function automatic void encode(input bit msg [239], output bit cw [255]);
    bit g [17];
    bit r [16];
    bit fb;
    foreach (g[i]) g[i] = 0;
    foreach (r[i]) r[i] = 0;
    g[0]=1; g[2]=1; g[3]=1; g[5]=1; g[6]=1; g[7]=1; g[8]=1; g[10]=1; g[11]=1; g[15]=1; g[16]=1;
    for (int i = 238; i >= 0; i--) begin
      fb = msg[i] ^ r[15];
      for (int j = 15; j > 0; j--) r[j] = r[j-1] ^ (fb & g[j]);
      r[0] = fb;
    end
    for (int i = 0; i < 16; i++)  cw[i] = r[i];
    for (int i = 0; i < 239; i++) cw[16 + i] = msg[i];
  endfunction

  // Syndrome S_j = r(alpha^j).
  function automatic int unsigned syn(bit w [255], int j);
    int unsigned s;
    s = 0;
    for (int i = 0; i < 255; i++) if (w[i]) s ^= alpha(i * j);
    return s;
  endfunction

endpackage

// bch_pkg: shared constants and Galois-field helper functions for the
// least-reliable-bits BCH soft decoders.
//
// Defaults describe the main configuration: the BCH(255,239) code, which
// corrects t=2 errors algebraically, over GF(2^8), with p=2 extra compensated
// bits and arithmetic pipelined every q=2 cell rows. The field polynomial
// x^8+x^6+x^5+x^4+1 (0x171) is this design's choice: it is the degree-8
// primitive polynomial whose minimal polynomials of alpha and alpha^3 give
// the 16-bit generator polynomial used for this code. Reliabilities are
// unsigned RW-bit magnitudes (assumed width 6).
//
// The functions work on 16-bit vectors so that any field size up to
// GF(2^16) can use them; callers pass the field size m and polynomial.
// They are used to build constants at elaboration time (constant
// multipliers, the logarithm table), not as datapath hardware.
package bch_pkg;

  localparam int GF_M    = 8;
  localparam int GF_POLY = 'h171;
  localparam int BCH_N   = 255;
  localparam int BCH_K   = 239;
  localparam int BCH_T   = 2;
  localparam int BCH_P   = 2;
  localparam int PIPE_Q  = 2;
  localparam int REL_W   = 6;

  // Multiply by x (alpha) and reduce by the field polynomial.
  function automatic logic [15:0] gf_mulx(logic [15:0] a, int m, int poly);
    logic [16:0] s;
    s = {a, 1'b0};
    if (s[m]) s = s ^ 17'(poly);
    return s[15:0];
  endfunction

  // Full field multiplication (shift and add), for constant generation.
  function automatic logic [15:0] gf_mul(logic [15:0] a, logic [15:0] b, int m, int poly);
    logic [15:0] r;
    logic [15:0] aa;
    r  = '0;
    aa = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r = r ^ aa;
      aa = gf_mulx(aa, m, poly);
    end
    return r;
  endfunction

  // alpha^e for any integer exponent (negative ones wrap modulo 2^m-1).
  function automatic logic [15:0] gf_alpha_pow(int e, int m, int poly);
    logic [15:0] r;
    int n;
    int ee;
    n  = (1 << m) - 1;
    ee = ((e % n) + n) % n;
    r  = 16'd1;
    for (int i = 0; i < ee; i++) r = gf_mulx(r, m, poly);
    return r;
  endfunction

endpackage

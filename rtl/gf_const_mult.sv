// gf_const_mult: multiplies a GF(2^M) element by the constant alpha^E.
//
// Purely combinational XOR network. Output bit j is the XOR of the input bits
// i for which bit j of alpha^(i+E) is set, so the network has at most about
// M^2 - M/2 two-input XOR gates and a depth of about log2(M) XOR gates, as a
// constant multiplier should. Elements are in polynomial basis, bit i being
// the coefficient of alpha^i. E may be negative (alpha^-1 is used by the
// error locator evaluator).
module gf_const_mult #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int E    = 1
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] y
);
  // Column i of the constant matrix is alpha^(i+E).
  logic [M-1:0] col [M];
  for (genvar i = 0; i < M; i++) begin : g_col
    assign col[i] = M'(bch_pkg::gf_alpha_pow(i + E, M, POLY));
  end

  always_comb begin
    y = '0;
    for (int i = 0; i < M; i++)
      if (x[i]) y = y ^ col[i];
  end
endmodule

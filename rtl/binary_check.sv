// binary_check: binary sequence check unit of the EBP decoder.
//
// Receives the p+1 solutions of the BP solver: G_0 for the received syndrome
// and G_i for the incremental syndrome of extra bit i. By linearity, flipping
// the extra bits selected by b = (b_1..b_p) leaves the magnitudes
// D = G_0 + sum_i b_i * G_i on the 2t least reliable bits. The unit steps b
// through all 2^p values in Gray-code order, so each step adds one G_i (one
// adder of 2t GF words), and tests whether every entry of D is 0 or 1: then
// the combination is a valid codeword with errors where D = 1 and where b = 1.
//
// Interface: `start` with gam valid (held until the last candidate); one
// candidate per cycle follows on the c_* outputs, from the cycle after start,
// 2^p candidates in all, c_last on the final one.
module binary_check #(
  parameter int M = bch_pkg::GF_M,
  parameter int T = bch_pkg::BCH_T,
  parameter int P = bch_pkg::BCH_P
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [M-1:0]   gam [P+1][2*T],
  output logic           c_valid,
  output logic           c_binary,
  output logic [2*T-1:0] c_gamma,
  output logic [P-1:0]   c_b,
  output logic           c_last
);
  localparam int NV = 2 * T;

  logic [P-1:0] b_bin;
  logic [M-1:0] delta [NV];
  int           flip;

  always_comb begin
    flip = P - 1;
    for (int i = P - 1; i >= 0; i--)
      if (!b_bin[i]) flip = i;
  end

  logic [M-1:0] d_next [NV];
  for (genvar v = 0; v < NV; v++) begin : g_add
    gf_adder #(.M(M)) u_add (.a(delta[v]), .b(gam[flip+1][v]), .c(d_next[v]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c_valid <= 1'b0;
      b_bin   <= '0;
      for (int v = 0; v < NV; v++) delta[v] <= '0;
    end else if (start) begin
      c_valid <= 1'b1;
      b_bin   <= '0;
      for (int v = 0; v < NV; v++) delta[v] <= gam[0][v];
    end else if (c_valid) begin
      if (c_last) begin
        c_valid <= 1'b0;
      end else begin
        b_bin <= b_bin + 1'b1;
        for (int v = 0; v < NV; v++) delta[v] <= d_next[v];
      end
    end
  end

  always_comb begin
    c_b      = b_bin ^ (b_bin >> 1);
    c_last   = c_valid && (&b_bin);
    c_binary = 1'b1;
    for (int v = 0; v < NV; v++) begin
      c_gamma[v] = delta[v][0];
      if (delta[v][M-1:1] != '0) c_binary = 1'b0;
    end
  end
endmodule

// eff_syndrome: effective syndrome calculation unit of the EHe decoder.
//
// Keeps S_eff = S_odd + sum_i a_i * dS_i, where dS_i = (b_i, b_i^3, ...,
// b_i^(2t-1)) are the odd incremental syndromes of the p extra locators b_i
// (flipping bit i of the received word adds b_i^j to S_j). The vector
// A = (a_1..a_p) steps through all 2^p values in Gray-code order, so each step
// changes S_eff by exactly one dS_i: one adder (t GF XOR words) suffices.
//
// Interface: `start` loads S_eff = S_odd and A = 0 and computes the dS_i with
// a bodd_calc unit (power-sum chain); `ready` rises when they are known.
// Each `adv` pulse moves A to its next Gray value and updates S_eff on the
// following clock edge. `a_gray` and `s_eff` are registered.
module eff_syndrome #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int T    = bch_pkg::BCH_T,
  parameter int P    = bch_pkg::BCH_P
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] syn_odd [T],
  input  logic [M-1:0] beta_x  [P],
  input  logic         adv,
  output logic         ready,
  output logic [P-1:0] a_gray,
  output logic [M-1:0] s_eff   [T]
);
  logic [M-1:0] ds [P][T];
  logic         ds_done;
  logic [P-1:0] a_bin;
  localparam int FW = (P > 1) ? $clog2(P) : 1;
  logic [FW-1:0] flip;

  bodd_calc #(.M(M), .POLY(POLY), .Q(Q), .T(T), .NE(P)) u_ds (
    .clk, .rst, .start, .x(beta_x), .pw(ds), .done(ds_done)
  );

  // The bit that changes going from a_bin to a_bin+1 in Gray code is the
  // number of trailing ones of a_bin.
  always_comb begin
    flip = '0;
    for (int i = P - 1; i >= 0; i--)
      if (!a_bin[i]) flip = FW'(i);
    if (&a_bin) flip = FW'(P - 1);
  end

  assign a_gray = a_bin ^ (a_bin >> 1);

  // The single adder of the unit: S_eff + dS_flip.
  logic [M-1:0] s_next [T];
  for (genvar j = 0; j < T; j++) begin : g_add
    gf_adder #(.M(M)) u_add (.a(s_eff[j]), .b(ds[flip][j]), .c(s_next[j]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready <= 1'b0;
      a_bin <= '0;
      for (int j = 0; j < T; j++) s_eff[j] <= '0;
    end else if (start) begin
      ready <= 1'b0;
      a_bin <= '0;
      for (int j = 0; j < T; j++) s_eff[j] <= syn_odd[j];
    end else begin
      if (ds_done) ready <= 1'b1;
      if (adv) begin
        a_bin <= a_bin + 1'b1;
        for (int j = 0; j < T; j++) s_eff[j] <= s_next[j];
      end
    end
  end
endmodule

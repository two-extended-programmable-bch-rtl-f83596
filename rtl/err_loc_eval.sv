// err_loc_eval: error locator evaluator. Keeps the D = 2t+p least reliable
// bits of a received word, sorted by ascending reliability, with their
// locations and error locators.
//
// One received bit is accepted per cycle while in_valid is high. A counter,
// cleared at the start of each word, gives the arrival index cL of the bit
// (0 for the first bit, which by the Horner order of the syndrome unit is
// coefficient r_{n-1}). A register preloaded with alpha^0 = alpha^n is
// multiplied by alpha^-1 on every bit, so the locator of arrival index cL is
// c_beta = alpha^(n-1-cL). The D sorted entries form a shift-insert chain:
// entry i takes the new bit when the new reliability is below entry i and
// not below entry i-1, takes entry i-1 when the new reliability is below
// entry i-1, and holds otherwise. Empty entries count as unreliable-most
// (+infinity), so equal reliabilities keep arrival order.
//
// Interface: in_first marks the first bit of a word, which restarts the
// counter, the locator register and the sorted list. After N accepted bits
// `done` pulses for one cycle and the outputs hold until the next word
// starts; `count` is the arrival index of the next bit. The structure (3*D registers, a counter and
// one alpha^-1 constant multiplier) follows the document; the empty-entry
// flags and the in_first input are this design's choices.
module err_loc_eval #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int N    = bch_pkg::BCH_N,
  parameter int D    = 2 * bch_pkg::BCH_T + bch_pkg::BCH_P,
  parameter int RW   = bch_pkg::REL_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic [RW-1:0] rel_in,
  output logic [M-1:0]  count,
  output logic          done,
  output logic [RW-1:0] rel  [D],
  output logic [M-1:0]  loc  [D],
  output logic [M-1:0]  beta [D]
);
  logic [M-1:0] cb_q, cb_eff, c_beta, cnt_eff;
  logic         vld [D];
  logic         lt  [D];

  // A first bit sees an empty list, count 0 and the preloaded alpha^0.
  assign cb_eff  = in_first ? M'(1) : cb_q;
  assign cnt_eff = in_first ? '0 : count;

  gf_const_mult #(.M(M), .POLY(POLY), .E(-1)) u_alpha_inv (.x(cb_eff), .y(c_beta));

  always_comb
    for (int i = 0; i < D; i++) lt[i] = in_first || !vld[i] || (rel_in < rel[i]);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      count <= '0;
      cb_q  <= M'(1);
      for (int i = 0; i < D; i++) begin
        vld[i]  <= 1'b0;
        rel[i]  <= '0;
        loc[i]  <= '0;
        beta[i] <= '0;
      end
    end else if (in_valid) begin
      count <= cnt_eff + 1'b1;
      cb_q  <= c_beta;
      if (int'(cnt_eff) == N - 1) done <= 1'b1;
      for (int i = 0; i < D; i++) begin
        if (i > 0 && lt[i-1]) begin
          vld[i]  <= vld[i-1] && !in_first;
          rel[i]  <= rel[i-1];
          loc[i]  <= loc[i-1];
          beta[i] <= beta[i-1];
        end else if (lt[i]) begin
          vld[i]  <= 1'b1;
          rel[i]  <= rel_in;
          loc[i]  <= cnt_eff;
          beta[i] <= c_beta;
        end
      end
    end
  end
endmodule

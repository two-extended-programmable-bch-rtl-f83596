// weight_errloc: weight and error location unit of the EHe decoder.
//
// Receives the candidate stream of the heuristic search unit (one per cycle)
// and keeps the valid candidate of least error weight, the weight being the
// sum of the reliabilities of the bits it flips. Because Gamma and A both
// move in Gray-code order, consecutive candidates differ in at most one Gamma
// bit and one A bit, so the two partial weights are kept by two add/subtract
// units: the changed bit's reliability is added if the bit was set and
// subtracted if it was cleared. A further error found through a geometric
// discrepancy is charged half the largest reliability, 2^(RW-1), instead of
// its own reliability (which is not stored).
//
// Interface: `start` clears the partial and minimum weights. Each c_valid
// candidate is scored in the cycle it arrives; on c_last the result is
// registered and `done` pulses one cycle later. `found` tells whether any valid
// candidate was seen; err_pattern bit i (i < 2t) means sorted bit i is in
// error, bit 2t+i that extra bit i is in error.
module weight_errloc #(
  parameter int M  = bch_pkg::GF_M,
  parameter int T  = bch_pkg::BCH_T,
  parameter int P  = bch_pkg::BCH_P,
  parameter int RW = bch_pkg::REL_W,
  parameter int WW = RW + $clog2(2 * T + P + 2)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [RW-1:0]    rel [2*T+P],
  input  logic             c_valid,
  input  logic             c_hit,
  input  logic             c_extra,
  input  logic [M-1:0]     c_extra_loc,
  input  logic [2*T-1:0]   c_gamma,
  input  logic [P-1:0]     c_a,
  input  logic             c_last,
  output logic             done,
  output logic             found,
  output logic [2*T+P-1:0] err_pattern,
  output logic             extra_valid,
  output logic [M-1:0]     extra_loc,
  output logic [WW-1:0]    min_weight
);
  localparam int G = 2 * T;

  logic [G-1:0]  prev_g;
  logic [P-1:0]  prev_a;
  logic [WW-1:0] wg_q, wa_q, wg_d, wa_d, w_tot;
  logic          better;

  always_comb begin
    logic [G-1:0] dg;
    logic [P-1:0] da;
    dg   = c_gamma ^ prev_g;
    da   = c_a ^ prev_a;
    wg_d = wg_q;
    wa_d = wa_q;
    for (int i = 0; i < G; i++)
      if (dg[i]) wg_d = c_gamma[i] ? wg_d + WW'(rel[i]) : wg_d - WW'(rel[i]);
    for (int i = 0; i < P; i++)
      if (da[i]) wa_d = c_a[i] ? wa_d + WW'(rel[G+i]) : wa_d - WW'(rel[G+i]);
    w_tot  = wg_d + wa_d + (c_extra ? WW'(1 << (RW - 1)) : '0);
    better = c_hit && (!found || (w_tot < min_weight));
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst || start) begin
      prev_g      <= '0;
      prev_a      <= '0;
      wg_q        <= '0;
      wa_q        <= '0;
      found       <= 1'b0;
      err_pattern <= '0;
      extra_valid <= 1'b0;
      extra_loc   <= '0;
      min_weight  <= '0;
    end else if (c_valid) begin
      prev_g <= c_gamma;
      prev_a <= c_a;
      wg_q   <= wg_d;
      wa_q   <= wa_d;
      if (better) begin
        found       <= 1'b1;
        min_weight  <= w_tot;
        err_pattern <= {c_a, c_gamma};
        extra_valid <= c_extra;
        extra_loc   <= c_extra ? c_extra_loc : '0;
      end
      if (c_last) done <= 1'b1;
    end
  end
endmodule

// err_calc: error calculation unit of the EBP decoder.
//
// Scores each candidate of the binary sequence check unit and keeps the valid
// one of least error weight (sum of reliabilities of the flipped bits). The
// weight has two parts: the extra bits selected by b, kept by an add/subtract
// unit that follows b's Gray-code steps (add the changed bit's reliability if
// it was set, subtract if cleared), and the 2t least reliable bits selected
// by the binary solution, summed by an adder tree since that pattern can
// change arbitrarily between candidates. The comparison with the stored
// minimum happens in the same cycle (no pipelining of the tree, i.e. St = 0).
//
// Interface: `start` clears; c_valid candidates are scored as they arrive;
// `done` pulses the cycle after c_last, when found/err_pattern/min_weight are
// valid. err_pattern bit i (i < 2t) is sorted bit i, bit 2t+i extra bit i.
module err_calc #(
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
  input  logic             c_binary,
  input  logic [2*T-1:0]   c_gamma,
  input  logic [P-1:0]     c_b,
  input  logic             c_last,
  output logic             done,
  output logic             found,
  output logic [2*T+P-1:0] err_pattern,
  output logic [WW-1:0]    min_weight
);
  localparam int G = 2 * T;

  logic [P-1:0]  prev_b;
  logic [WW-1:0] wb_q, wb_d, wg, w_tot;
  logic          better;

  always_comb begin
    logic [P-1:0] db;
    db   = c_b ^ prev_b;
    wb_d = wb_q;
    for (int i = 0; i < P; i++)
      if (db[i]) wb_d = c_b[i] ? wb_d + WW'(rel[G+i]) : wb_d - WW'(rel[G+i]);
    wg = '0;
    for (int i = 0; i < G; i++)
      if (c_gamma[i]) wg = wg + WW'(rel[i]);
    w_tot  = wg + wb_d;
    better = c_binary && (!found || (w_tot < min_weight));
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst || start) begin
      prev_b      <= '0;
      wb_q        <= '0;
      found       <= 1'b0;
      err_pattern <= '0;
      min_weight  <= '0;
    end else if (c_valid) begin
      prev_b <= c_b;
      wb_q   <= wb_d;
      if (better) begin
        found       <= 1'b1;
        min_weight  <= w_tot;
        err_pattern <= {c_b, c_gamma};
      end
      if (c_last) done <= 1'b1;
    end
  end
endmodule

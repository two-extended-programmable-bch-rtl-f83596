// ehe_ems: extended heuristic error magnitude solver (EHe-EMS).
//
// Joins the four units of the EHe solver: the B_odd matrix calculation unit
// (odd powers of the 2t least reliable locators), the effective syndrome unit
// (odd powers of the p extra locators, Gray-stepped effective syndrome), the
// heuristic search unit (one candidate error pattern per cycle over all
// 2^(2t+p) patterns, with detection of one further error anywhere) and the
// weight and error location unit (minimum-weight choice).
//
// Interface: `start` with the locators, reliabilities and odd syndromes valid
// (they must stay stable until `done`). `done` pulses when the result outputs
// are valid; they then hold until the next `start`. The solve takes
// max(2t, p+1) + (t-1)*ceil(m/q) + 2 cycles of table setup (B_odd needs
// 2t + (t-1)*ceil(m/q) + 1, the extra-bit increments p + (t-1)*ceil(m/q) + 2),
// then 2^(2t+p) search
// cycles, then the check pipeline of (t-1)*ceil(m/q) + 2 cycles.
module ehe_ems #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int N    = bch_pkg::BCH_N,
  parameter int T    = bch_pkg::BCH_T,
  parameter int P    = bch_pkg::BCH_P,
  parameter int RW   = bch_pkg::REL_W,
  parameter int WW   = RW + $clog2(2 * T + P + 2)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [M-1:0]     beta    [2*T+P],
  input  logic [RW-1:0]    rel     [2*T+P],
  input  logic [M-1:0]     syn_odd [T],
  output logic             done,
  output logic             found,
  output logic [2*T+P-1:0] err_pattern,
  output logic             extra_valid,
  output logic [M-1:0]     extra_loc,
  output logic [WW-1:0]    min_weight
);
  localparam int G = 2 * T;

  logic [M-1:0] beta_l [G];
  logic [M-1:0] beta_x [P];
  always_comb begin
    for (int i = 0; i < G; i++) beta_l[i] = beta[i];
    for (int i = 0; i < P; i++) beta_x[i] = beta[G+i];
  end

  logic [M-1:0] bodd [G][T];
  logic         bodd_done, bodd_ok, eff_ready, search_go, adv;
  logic [P-1:0] a_gray;
  logic [M-1:0] s_eff [T];
  logic         waiting;

  bodd_calc #(.M(M), .POLY(POLY), .Q(Q), .T(T), .NE(G)) u_bodd (
    .clk, .rst, .start, .x(beta_l), .pw(bodd), .done(bodd_done)
  );

  eff_syndrome #(.M(M), .POLY(POLY), .Q(Q), .T(T), .P(P)) u_eff (
    .clk, .rst, .start, .syn_odd, .beta_x, .adv,
    .ready(eff_ready), .a_gray, .s_eff
  );

  // Start the search once both tables are known.
  always_ff @(posedge clk) begin
    search_go <= 1'b0;
    if (rst) begin
      waiting <= 1'b0;
      bodd_ok <= 1'b0;
    end else if (start) begin
      waiting <= 1'b1;
      bodd_ok <= 1'b0;
    end else if (waiting) begin
      if (bodd_done) bodd_ok <= 1'b1;
      if ((bodd_ok || bodd_done) && eff_ready) begin
        waiting   <= 1'b0;
        search_go <= 1'b1;
      end
    end
  end

  logic           c_valid, c_hit, c_extra, c_last;
  logic [M-1:0]   c_extra_loc;
  logic [G-1:0]   c_gamma;
  logic [P-1:0]   c_a;

  heuristic_search #(.M(M), .POLY(POLY), .Q(Q), .N(N), .T(T), .P(P)) u_search (
    .clk, .rst, .start(search_go), .bodd, .s_eff, .a_gray, .adv, .busy(),
    .c_valid, .c_hit, .c_extra, .c_extra_loc, .c_gamma, .c_a, .c_last
  );

  weight_errloc #(.M(M), .T(T), .P(P), .RW(RW), .WW(WW)) u_weight (
    .clk, .rst, .start, .rel,
    .c_valid, .c_hit, .c_extra, .c_extra_loc, .c_gamma, .c_a, .c_last,
    .done, .found, .err_pattern, .extra_valid, .extra_loc, .min_weight
  );
endmodule

// ebp_ems: extended Bjorck-Pereyra error magnitude solver (EBP-EMS).
//
// Joins the four units of the EBP solver. The incremental syndrome unit
// computes, for each of the p extra bits, the syndrome change its flip causes;
// meanwhile the BP solver prepares its table of inverses from the 2t least
// reliable locators. The BP solver then solves the Vandermonde system p+1
// times: once for the received syndromes (G_0) and once per incremental
// syndrome (G_i). The binary sequence check unit combines the solutions for
// all 2^p choices of extra bits and flags the binary ones, and the error
// calculation unit keeps the one of least error weight.
//
// Interface: `start` with beta, rel and syn valid and held until `done`.
// `done` pulses when found/err_pattern/min_weight are valid; they hold until
// the next start. `stall_cycles` reports the BP solver's pipeline stalls.
module ebp_ems #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int T    = bch_pkg::BCH_T,
  parameter int P    = bch_pkg::BCH_P,
  parameter int RW   = bch_pkg::REL_W,
  parameter int WW   = RW + $clog2(2 * T + P + 2)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [M-1:0]     beta [2*T+P],
  input  logic [RW-1:0]    rel  [2*T+P],
  input  logic [M-1:0]     syn  [2*T],
  output logic             done,
  output logic             found,
  output logic [2*T+P-1:0] err_pattern,
  output logic [WW-1:0]    min_weight,
  output logic [15:0]      stall_cycles
);
  localparam int NV = 2 * T;
  localparam int SW = $clog2(P + 2);
  localparam int EW = (P > 1) ? $clog2(P) : 1;

  logic [M-1:0] beta_l [NV];
  logic [M-1:0] beta_x [P];
  always_comb begin
    for (int v = 0; v < NV; v++) beta_l[v] = beta[v];
    for (int v = 0; v < P; v++)  beta_x[v] = beta[NV+v];
  end

  logic [M-1:0] ds  [P][NV];
  logic [M-1:0] gam [P+1][NV];
  logic [M-1:0] rhs [NV];
  logic [M-1:0] xs  [NV];
  logic         ds_done, pre_done, solve_start, solve_done, chk_start;
  logic         ds_ok, pre_ok, solving;
  logic [SW-1:0] s_idx;

  incr_syndrome #(.M(M), .POLY(POLY), .Q(Q), .T(T), .P(P)) u_incr (
    .clk, .rst, .start, .beta_x, .ds, .done(ds_done)
  );

  always_comb
    for (int v = 0; v < NV; v++)
      rhs[v] = (s_idx == '0) ? syn[v] : ds[EW'(s_idx - 1'b1)][v];

  bp_solver #(.M(M), .POLY(POLY), .Q(Q), .T(T)) u_bp (
    .clk, .rst, .pre_start(start), .beta(beta_l), .pre_done,
    .solve_start, .rhs, .solve_done, .x(xs), .stall_cycles
  );

  // Sequencer: wait for both tables, then solve for S, dS_1, ..., dS_p.
  always_ff @(posedge clk) begin
    solve_start <= 1'b0;
    chk_start   <= 1'b0;
    if (rst) begin
      ds_ok   <= 1'b0;
      pre_ok  <= 1'b0;
      solving <= 1'b0;
      s_idx   <= '0;
    end else if (start) begin
      ds_ok   <= 1'b0;
      pre_ok  <= 1'b0;
      solving <= 1'b0;
      s_idx   <= '0;
    end else begin
      if (ds_done)  ds_ok  <= 1'b1;
      if (pre_done) pre_ok <= 1'b1;
      if (!solving && (ds_ok || ds_done) && (pre_ok || pre_done)) begin
        solving     <= 1'b1;
        solve_start <= 1'b1;
        ds_ok       <= 1'b0;
        pre_ok      <= 1'b0;
      end
      if (solve_done) begin
        for (int v = 0; v < NV; v++) gam[s_idx][v] <= xs[v];
        if (s_idx == SW'(P)) begin
          chk_start <= 1'b1;
          solving   <= 1'b0;
          s_idx     <= '0;
        end else begin
          s_idx       <= s_idx + 1'b1;
          solve_start <= 1'b1;
        end
      end
    end
  end

  logic           c_valid, c_binary, c_last;
  logic [NV-1:0]  c_gamma;
  logic [P-1:0]   c_b;

  binary_check #(.M(M), .T(T), .P(P)) u_chk (
    .clk, .rst, .start(chk_start), .gam, .c_valid, .c_binary, .c_gamma, .c_b, .c_last
  );

  err_calc #(.T(T), .P(P), .RW(RW), .WW(WW)) u_err (
    .clk, .rst, .start, .rel, .c_valid, .c_binary, .c_gamma, .c_b, .c_last,
    .done, .found, .err_pattern, .min_weight
  );
endmodule

// heuristic_search: heuristic search unit of the EHe decoder.
//
// For every extra-bit combination A (supplied, in Gray order, by the effective
// syndrome unit) it walks through all 2^(2t) error patterns Gamma on the 2t
// least reliable bits and evaluates the odd discrepancy
// Delta_odd = B_odd x Gamma + S_eff. Gamma also runs in Gray-code order, so
// each cycle Delta_odd changes by one row of B_odd: one GF adder per odd
// syndrome, one candidate per cycle. Delta_odd is then classified:
//   zero       -> Gamma and A give a valid codeword;
//   geometric  -> Delta_odd = (x, x^3, ..., x^(2t-1)) with x != 0: one further
//                 error at the bit whose locator is x. The cubes etc. of x
//                 come from a chain of t-1 power-sum units, the rest of the
//                 candidate being delayed alongside; the location is read
//                 from a logarithm look-up table built at elaboration.
//
// Interface: `start` (with `s_eff` valid and A = 0) begins a sweep of
// 2^(2t+p) candidates; `adv` asks the effective syndrome unit for the next A
// two cycles before each new Gamma sweep. Candidates appear on the c_* outputs
// (T-1)*ceil(M/Q) + 1 cycles after they are formed; c_last marks the final
// one. The document counts t-2 power-sum units for this check; a chain of
// t-1 is used here so that x^3 is also computed when t = 2.
module heuristic_search #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int N    = bch_pkg::BCH_N,
  parameter int T    = bch_pkg::BCH_T,
  parameter int P    = bch_pkg::BCH_P
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [M-1:0]   bodd   [2*T][T],
  input  logic [M-1:0]   s_eff  [T],
  input  logic [P-1:0]   a_gray,
  output logic           adv,
  output logic           busy,
  output logic           c_valid,
  output logic           c_hit,
  output logic           c_extra,
  output logic [M-1:0]   c_extra_loc,
  output logic [2*T-1:0] c_gamma,
  output logic [P-1:0]   c_a,
  output logic           c_last
);
  localparam int G = 2 * T;

  // ---------------- issue stage: Gray walk over Gamma ----------------
  logic [G-1:0]   j_bin;       // index within the current Gamma sweep
  logic [P-1:0]   blk;         // index of the current A block
  logic           run;
  logic           s0_v, s0_last;
  logic [G-1:0]   s0_gamma;
  logic [P-1:0]   s0_a;
  logic [M-1:0]   s0_delta [T];
  localparam int GW = $clog2(G);
  logic [GW-1:0]  gflip;

  // Bit flipped going from j_bin to j_bin+1 in Gray code.
  always_comb begin
    gflip = GW'(G - 1);
    for (int i = G - 1; i >= 0; i--)
      if (!j_bin[i]) gflip = GW'(i);
  end

  assign busy = run;
  assign adv  = run && (j_bin == G'((1 << G) - 3)) && (blk != P'((1 << P) - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      run   <= 1'b0;
      j_bin <= '0;
      blk   <= '0;
      s0_v  <= 1'b0;
      s0_last <= 1'b0;
      s0_gamma <= '0;
      s0_a  <= '0;
      for (int k = 0; k < T; k++) s0_delta[k] <= '0;
    end else if (start) begin
      run      <= 1'b1;
      j_bin    <= '0;
      blk      <= '0;
      s0_v     <= 1'b1;
      s0_last  <= 1'b0;
      s0_gamma <= '0;
      s0_a     <= a_gray;
      for (int k = 0; k < T; k++) s0_delta[k] <= s_eff[k];
    end else if (run) begin
      if (j_bin == G'((1 << G) - 1)) begin
        if (blk == P'((1 << P) - 1)) begin
          run  <= 1'b0;
          s0_v <= 1'b0;
        end else begin
          // New A block: reload from the effective syndrome, Gamma = 0.
          blk      <= blk + 1'b1;
          j_bin    <= '0;
          s0_gamma <= '0;
          s0_a     <= a_gray;
          for (int k = 0; k < T; k++) s0_delta[k] <= s_eff[k];
        end
        s0_last <= 1'b0;
      end else begin
        j_bin <= j_bin + 1'b1;
        s0_gamma[gflip] <= ~s0_gamma[gflip];
        for (int k = 0; k < T; k++) s0_delta[k] <= s0_delta[k] ^ bodd[gflip][k];
        s0_last <= (j_bin == G'((1 << G) - 2)) && (blk == P'((1 << P) - 1));
      end
    end else begin
      s0_v <= 1'b0;
    end
  end

  // ---------------- geometric-sequence check ----------------
  // Tag: last, A, Gamma, Delta_odd (T words), then the powers of x so far.
  localparam int DW = T * M;
  localparam int CW = 1 + P + G + DW + T * M;
  logic          cv [T];
  logic [CW-1:0] ct [T];
  logic [DW-1:0] s0_dpk;

  always_comb
    for (int k = 0; k < T; k++) s0_dpk[k*M +: M] = s0_delta[k];

  assign cv[0] = s0_v;
  assign ct[0] = {s0_last, s0_a, s0_gamma, s0_dpk, {(T-1)*M{1'b0}}, s0_delta[0]};

  for (genvar s = 1; s < T; s++) begin : g_chain
    logic [M-1:0]  prod;
    logic [CW-1:0] tg;
    gf_power_sum #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(CW)) u_ps (
      .clk, .rst,
      .in_valid (cv[s-1]),
      .a        (ct[s-1][(s-1)*M +: M]),
      .b        (ct[s-1][M-1:0]),
      .c        ('0),
      .tag_in   (ct[s-1]),
      .out_valid(cv[s]),
      .p        (prod),
      .tag_out  (tg)
    );
    always_comb begin
      ct[s] = tg;
      ct[s][s*M +: M] = prod;
    end
  end

  // Logarithm look-up table: locator alpha^e belongs to arrival index n-1-e.
  logic [M-1:0] loc_tbl [1 << M];
  assign loc_tbl[0] = '0;
  for (genvar e = 0; e < (1 << M) - 1; e++) begin : g_lut
    assign loc_tbl[M'(bch_pkg::gf_alpha_pow(e, M, POLY))] = M'((N - 1 - e + ((1 << M) - 1)) % ((1 << M) - 1));
  end

  logic [DW-1:0] fin_d;
  logic [M-1:0]  fin_x;
  logic          is_zero, is_geo;

  always_comb begin
    fin_d   = ct[T-1][T*M +: DW];
    fin_x   = ct[T-1][M-1:0];
    is_zero = (fin_d == '0);
    is_geo  = (fin_x != '0);
    for (int k = 0; k < T; k++)
      if (fin_d[k*M +: M] != ct[T-1][k*M +: M]) is_geo = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) c_valid <= 1'b0;
    else     c_valid <= cv[T-1];
    c_hit       <= is_zero || is_geo;
    c_extra     <= is_geo;
    c_extra_loc <= loc_tbl[fin_x];
    c_gamma     <= ct[T-1][DW + T*M +: G];
    c_a         <= ct[T-1][DW + T*M + G +: P];
    c_last      <= cv[T-1] && ct[T-1][CW-1];
  end
endmodule

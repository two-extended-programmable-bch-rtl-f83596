// soft_decoder_bench: configurable end-to-end bench for bch_soft_decoder_top.
//
// Runs both decoders on NFRAMES random words of a BCH(N, K, T) code over
// GF(2^M), field polynomial POLY, with P extra bits. tb_workloads runs one
// copy per evaluated code and p; this module reports its check counts and
// raises `done` instead of ending the simulation.
//
// Everything the reference needs is built here from M, POLY and T alone:
// exp/log tables, and the generator polynomial as the product of the minimal
// polynomials of alpha, alpha^3, ..., alpha^(2T-1). Messages are encoded
// systematically. Errors are placed by scenario:
//   0  none
//   1  two errors among the 2t least reliable bits
//   2  one in those bits and one on an extra bit
//   3  errors on all 2t+p sorted bits
//   4  two in the 2t bits plus one on a reliable bit far away
//   5  t+3 random errors on reliable bits
// Reliabilities are chosen so that the 2t+p+2 least reliable bits have
// distinct small values.
//
// Each result is compared with a brute-force search over all 2^(2t+p) flip
// patterns of the sorted bits (EHe: optionally plus one further error,
// charged 2^(RW-1)), checking decode success, minimum weight, sorted
// locations and that the reported flips give a codeword. The EHe latency must
// be 2^(2t+p) + max(2t, p+1) + 2(t-1)ceil(m/q) + 5 rising edges from the edge that takes
// the last bit to op_ready (seen one edge later by this bench); the EBP latency must be the
// same for every word. Extra-bit corrections (both decoders), the EHe
// further-error rule, decoding failures and BP stalls must each occur.
module soft_decoder_bench #(
  parameter int          M       = 8,
  parameter int          POLY    = 'h171,
  parameter int          N       = 255,
  parameter int          T       = 2,
  parameter int          P       = 2,
  parameter int          NFRAMES = 24
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int RW  = 6;
  localparam int D   = 2 * T + P;
  localparam int WW  = RW + $clog2(D + 2);
  localparam int Q   = 2;
  localparam int LAT = (M + Q - 1) / Q;
  localparam int NFIELD = (1 << M) - 1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic             ehe_in_valid, ehe_data_in, ebp_in_valid, ebp_data_in;
  logic [RW-1:0]    ehe_rel_in, ebp_rel_in;
  logic             ehe_in_ready, ehe_op_ready, ebp_in_ready, ebp_op_ready;
  logic [M-1:0]     ehe_sorted_loc [D];
  logic [M-1:0]     ebp_sorted_loc [D];
  logic [D-1:0]     ehe_error_locations, ebp_error_locations;
  logic             ehe_extra_error_valid, ehe_decode_ok, ebp_decode_ok;
  logic [M-1:0]     ehe_extra_error;
  logic [WW-1:0]    ehe_weight, ebp_weight;
  logic [15:0]      ebp_stall_cycles;

  bch_soft_decoder_top #(.M(M), .POLY(POLY), .Q(Q), .N(N), .T(T), .P(P), .RW(RW)) dut (.*);


  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (n=%0d t=%0d p=%0d): %s", N, T, P, what);
    end
  endtask


  // ---------------- field and code ----------------
  int unsigned exp_t [2 * NFIELD + 2];
  int unsigned log_t [NFIELD + 1];
  bit          gen [N];      // generator coefficients (degree < N)
  int          gdeg;
  int          K;

  function automatic int unsigned fmul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int unsigned fpow(int unsigned a, int e);
    if (a == 0) return 0;
    return exp_t[(log_t[a] * e) % NFIELD];
  endfunction

  function automatic int unsigned falpha(int e);
    return exp_t[((e % NFIELD) + NFIELD) % NFIELD];
  endfunction

  // Builds the tables and g(x) = product of the distinct minimal polynomials
  // of alpha^(2j+1), j = 0..T-1. Each minimal polynomial is the product of
  // (x + alpha^c) over the conjugacy class c, 2c, 4c, ... mod 2^M - 1.
  function automatic void build_code();
    int unsigned v;
    int unsigned g [N + 1];
    bit          done_e [NFIELD];
    v = 1;
    for (int e = 0; e < NFIELD; e++) begin
      exp_t[e] = v;
      exp_t[e + NFIELD] = v;
      log_t[v] = e;
      v = v << 1;
      if (v & (1 << M)) v = v ^ POLY;
    end
    exp_t[2 * NFIELD]     = exp_t[0];
    exp_t[2 * NFIELD + 1] = exp_t[1];
    log_t[0] = 0;
    foreach (g[i]) g[i] = 0;
    foreach (done_e[i]) done_e[i] = 0;
    g[0] = 1;
    gdeg = 0;
    for (int j = 0; j < T; j++) begin
      int c;
      c = 2 * j + 1;
      if (!done_e[c]) begin
        int cc;
        cc = c;
        do begin
          // g(x) <- g(x) * (x + alpha^cc)
          done_e[cc] = 1;
          for (int i = gdeg + 1; i >= 1; i--) g[i] = g[i - 1] ^ fmul(g[i], falpha(cc));
          g[0] = fmul(g[0], falpha(cc));
          gdeg++;
          cc = (2 * cc) % NFIELD;
        end while (cc != c);
      end
    end
    foreach (gen[i]) gen[i] = 0;
    for (int i = 0; i <= gdeg; i++) begin
      if (g[i] > 1) $display("FAIL: generator coefficient not binary");
      gen[i] = g[i][0];
    end
    K = N - gdeg;
  endfunction

  // Systematic encoding: parity = x^(N-K) m(x) mod g(x). cw[i] is the
  // coefficient of x^i.
  function automatic void encode(output bit cw [N]);
    bit r [N];
    bit fb;
    foreach (r[i]) r[i] = 0;
    foreach (cw[i]) cw[i] = 0;
    for (int i = K - 1; i >= 0; i--) begin
      bit mbit;
      mbit = 1'($urandom);
      cw[gdeg + i] = mbit;
      fb = mbit ^ r[gdeg - 1];
      for (int j = gdeg - 1; j > 0; j--) r[j] = r[j - 1] ^ (fb & gen[j]);
      r[0] = fb;
    end
    for (int i = 0; i < gdeg; i++) cw[i] = r[i];
  endfunction

  function automatic int unsigned syn(bit w [N], int j);
    int unsigned s;
    s = 0;
    for (int i = 0; i < N; i++) if (w[i]) s ^= falpha(i * j);
    return s;
  endfunction

  // ---------------- per-word state and reference ----------------
  bit          cw  [N];
  bit          rx  [N];
  int unsigned rel [N];
  int          ref_sorted [D];
  int          ehe_min, ebp_min;
  bit          ehe_found, ebp_found;

  function automatic bit zero_odd(int unsigned s [T]);
    for (int j = 0; j < T; j++) if (s[j] != 0) return 0;
    return 1;
  endfunction

  function automatic bit geometric(int unsigned s [T]);
    if (s[0] == 0) return 0;
    for (int j = 1; j < T; j++) if (s[j] != fpow(s[0], 2 * j + 1)) return 0;
    return 1;
  endfunction

  function automatic void reference();
    bit          used [N];
    int unsigned s0 [T];
    int unsigned sv [T];
    int          w, pos;
    foreach (used[i]) used[i] = 0;
    for (int s = 0; s < D; s++) begin
      int best;
      best = -1;
      for (int a = 0; a < N; a++)
        if (!used[a] && (best < 0 || rel[N - 1 - a] < rel[N - 1 - best])) best = a;
      used[best] = 1;
      ref_sorted[s] = best;
    end
    for (int j = 0; j < T; j++) s0[j] = syn(rx, 2 * j + 1);
    ehe_found = 0; ebp_found = 0;
    ehe_min = 0; ebp_min = 0;
    for (int pat = 0; pat < (1 << D); pat++) begin
      sv = s0; w = 0;
      for (int b = 0; b < D; b++) if (pat[b]) begin
        pos = N - 1 - ref_sorted[b];
        for (int j = 0; j < T; j++) sv[j] ^= falpha(pos * (2 * j + 1));
        w += rel[pos];
      end
      if (zero_odd(sv)) begin
        if (!ebp_found || w < ebp_min) begin ebp_found = 1; ebp_min = w; end
        if (!ehe_found || w < ehe_min) begin ehe_found = 1; ehe_min = w; end
      end else if (geometric(sv)) begin
        if (!ehe_found || w + (1 << (RW - 1)) < ehe_min) begin
          ehe_found = 1; ehe_min = w + (1 << (RW - 1));
        end
      end
    end
  endfunction

  function automatic bit gives_codeword(logic [D-1:0] pat, logic [M-1:0] sl [D],
                                        bit xv, int xloc);
    bit w [N];
    w = rx;
    for (int b = 0; b < D; b++) if (pat[b]) w[N - 1 - int'(sl[b])] ^= 1'b1;
    if (xv) w[N - 1 - xloc] ^= 1'b1;
    for (int j = 0; j < T; j++) if (syn(w, 2 * j + 1) != 0) return 0;
    return 1;
  endfunction

  int n_extra_il = 0, n_ebp_il = 0, n_ehe_further = 0, n_fail = 0, n_stall = 0;

  initial begin
    int low [D + 2];
    int sc, ehe_lat, ebp_lat, ebp_lat0, ehe_lat_want;
    logic [15:0] stall_before;
    done = 1'b0;
    checks = 0;
    failures = 0;
    build_code();
    $display("BCH(%0d,%0d,%0d) over GF(2^%0d), p = %0d: generator degree %0d",
             N, K, T, M, P, gdeg);
    check(gdeg == M * T, "generator degree m*t");
    ehe_lat_want = (1 << D) + ((2 * T > P + 1) ? 2 * T : P + 1) + 2 * (T - 1) * LAT + 5 + 1;
    ehe_in_valid = 0; ebp_in_valid = 0;
    ehe_data_in = 0; ebp_data_in = 0; ehe_rel_in = 0; ebp_rel_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    ebp_lat0 = -1;
    for (int f = 0; f < NFRAMES; f++) begin
      encode(cw);
      check(syn(cw, 1) == 0 && syn(cw, 2 * T - 1) == 0, "encoder output is a codeword");
      rx = cw;
      foreach (rel[i]) rel[i] = 2 * (D + 2) + $urandom_range(1, 63 - 2 * (D + 2));
      for (int s = 0; s < D + 2; s++) begin
        bit dup;
        do begin
          low[s] = $urandom_range(0, N - 1);
          dup = 0;
          for (int u = 0; u < s; u++) if (low[u] == low[s]) dup = 1;
        end while (dup);
      end
      for (int s = 0; s < D + 2; s++) rel[low[s]] = 2 * (s + 1);
      sc = f % 6;
      case (sc)
        0: ;
        1: begin rx[low[0]] ^= 1; rx[low[2 * T - 1]] ^= 1; end
        2: begin rx[low[1]] ^= 1; rx[low[2 * T + $urandom_range(0, P - 1)]] ^= 1; end
        3: for (int s = 0; s < D; s++) rx[low[s]] ^= 1;
        4: begin
          int far;
          rx[low[0]] ^= 1; rx[low[1]] ^= 1;
          do far = $urandom_range(0, N - 1); while (rel[far] <= 2 * (D + 2));
          rx[far] ^= 1;
        end
        default: begin
          for (int e = 0; e < T + 3; e++) begin
            int pp;
            do pp = $urandom_range(0, N - 1); while (rel[pp] <= 2 * (D + 2));
            rx[pp] ^= 1;
          end
        end
      endcase
      reference();
      stall_before = ebp_stall_cycles;

      for (int a = 0; a < N; a++) begin
        ehe_in_valid <= 1; ebp_in_valid <= 1;
        ehe_data_in  <= rx[N - 1 - a]; ebp_data_in <= rx[N - 1 - a];
        ehe_rel_in   <= RW'(rel[N - 1 - a]); ebp_rel_in <= RW'(rel[N - 1 - a]);
        @(posedge clk);
        check(ehe_in_ready && ebp_in_ready, "decoders ready while receiving");
      end
      ehe_in_valid <= 0; ebp_in_valid <= 0;
      ehe_lat = 0; ebp_lat = 0;
      fork
        begin
          do begin @(posedge clk); ehe_lat++; end while (!ehe_op_ready);
        end
        begin
          do begin @(posedge clk); ebp_lat++; end while (!ebp_op_ready);
        end
      join

      for (int s = 0; s < D; s++) begin
        check(int'(ehe_sorted_loc[s]) == ref_sorted[s],
              $sformatf("frame %0d EHe sorted %0d: %0d ref %0d", f, s, ehe_sorted_loc[s], ref_sorted[s]));
        check(int'(ebp_sorted_loc[s]) == ref_sorted[s], $sformatf("frame %0d EBP sorted %0d", f, s));
      end
      check(ehe_decode_ok == ehe_found, $sformatf("frame %0d EHe found %0d ref %0d", f, ehe_decode_ok, ehe_found));
      check(ebp_decode_ok == ebp_found, $sformatf("frame %0d EBP found %0d ref %0d", f, ebp_decode_ok, ebp_found));
      if (ehe_found) begin
        check(int'(ehe_weight) == ehe_min, $sformatf("frame %0d EHe weight %0d ref %0d", f, ehe_weight, ehe_min));
        check(gives_codeword(ehe_error_locations, ehe_sorted_loc, ehe_extra_error_valid,
                             int'(ehe_extra_error)), $sformatf("frame %0d EHe codeword", f));
        if (ehe_extra_error_valid) n_ehe_further++;
        if ((ehe_error_locations >> (2 * T)) != 0) n_extra_il++;
      end else n_fail++;
      if (ebp_found) begin
        check(int'(ebp_weight) == ebp_min, $sformatf("frame %0d EBP weight %0d ref %0d", f, ebp_weight, ebp_min));
        check(gives_codeword(ebp_error_locations, ebp_sorted_loc, 1'b0, 0),
              $sformatf("frame %0d EBP codeword", f));
        if ((ebp_error_locations >> (2 * T)) != 0) n_ebp_il++;
      end else n_fail++;
      if (ebp_stall_cycles != stall_before) n_stall++;
      // Flipping all 2t+p sorted bits is always a solution, though not always
      // the lightest one (the weight itself is checked above).
      if (sc == 3) check(ehe_found && ebp_found, "both decoders found a solution with 2t+p errors");
      if (sc == 4) check(ehe_found && ehe_extra_error_valid, "EHe found the further error");
      check(ehe_lat == ehe_lat_want, $sformatf("EHe latency %0d, expected %0d", ehe_lat, ehe_lat_want));
      if (ebp_lat0 < 0) ebp_lat0 = ebp_lat;
      check(ebp_lat == ebp_lat0, $sformatf("EBP latency %0d vs %0d", ebp_lat, ebp_lat0));
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("n=%0d t=%0d p=%0d latency after the last bit (as seen here): EHe %0d, EBP %0d cycles", N, T, P, ehe_lat_want, ebp_lat0);
    $display("mechanisms: extra-bit corrections EHe %0d EBP %0d, EHe further errors %0d, failures %0d, words with BP stalls %0d",
             n_extra_il, n_ebp_il, n_ehe_further, n_fail, n_stall);
    check(n_extra_il > 0, "EHe corrected an extra bit");
    check(n_ebp_il > 0, "EBP corrected an extra bit");
    check(n_ehe_further > 0, "EHe further error used");
    check(n_fail > 0, "a decoding failure happened");
    check(n_stall > 0, "BP solver stalled");
    $display("BCH(%0d,%0d,%0d) p = %0d: checks=%0d failures=%0d", N, K, T, P, checks, failures);
    done = 1'b1;
  end
endmodule

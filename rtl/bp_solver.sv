// bp_solver: Bjorck-Pereyra (BP) solver unit of the EBP decoder.
//
// Solves the 2t x 2t system sum_i g_i * b_i^j = s_j (j = 1..2t) over GF(2^M)
// for the error magnitudes g_i, where b_i are the locators of the 2t least
// reliable bits. The matrix is Vandermonde, so the Bjorck-Pereyra method
// needs O(n^2) operations (n = 2t), in three steps (subtraction is XOR):
//   1. for k = 0..n-2, i = n-1 down to k+1:  x_i += b_k * x_{i-1}
//   2. for k = n-2 down to 0:
//        for i = k+1..n-1: x_i *= 1/(b_i + b_{i-k-1});
//        for i = k..n-2:   x_i += x_{i+1}          (one cycle, old values)
//   3. for k = 0..n-1:  x_k *= 1/b_k
// starting from x = s; then g = x.
//
// Hardware: one pipelined systolic multiplier, one pipelined inversion unit
// and XOR adders. The divisors depend only on the locators, which stay the
// same for the p+1 solves of one word, so all n(n+1)/2 inverses are computed
// once (`pre_start`, streamed through the inversion unit) and kept in a
// table. Within each inner loop the multiplications are independent and are
// issued back to back; before a loop whose operands depend on the previous one
// the unit stalls until the multiplier pipeline is empty. `stall_cycles`
// counts those cycles. The document names the algorithm, the unit types and
// the stall mechanism; the inverse table and the exact schedule are this
// design's choices.
//
// Interface: pre_start with beta valid -> pre_done pulse (beta held until
// the last solve ends). solve_start with rhs valid -> solve_done pulse, x
// then holds the solution until the next solve.
module bp_solver #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int T    = bch_pkg::BCH_T
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pre_start,
  input  logic [M-1:0] beta [2*T],
  output logic         pre_done,
  input  logic         solve_start,
  input  logic [M-1:0] rhs  [2*T],
  output logic         solve_done,
  output logic [M-1:0] x    [2*T],
  output logic [15:0]  stall_cycles
);
  localparam int NV = 2 * T;                  // system size
  localparam int NP = NV * (NV - 1) / 2;      // pair inverses
  localparam int NI = NP + NV;                // plus 1/b_k
  localparam int IW = $clog2(NI + 1);
  localparam int VW = $clog2(NV + 1);
  localparam int XW = (NV > 1) ? $clog2(NV) : 1;  // index into x / beta

  // Table index of 1/(b_i + b_j), i > j, and of 1/b_k.
  function automatic int pidx(int i, int j);
    return i * (i - 1) / 2 + j;
  endfunction

  // ---------------- inverse pre-computation ----------------
  logic [M-1:0]  inv_tbl [NI];
  logic          pre_run, inv_ov;
  logic [IW-1:0] pre_idx, inv_tag;
  logic [VW-1:0] pi, pj;       // current pair (pi > pj), or pj = pi for 1/b_pi
  logic [M-1:0]  inv_in, inv_out;

  assign inv_in = (pi == pj) ? beta[pi[XW-1:0]] : (beta[pi[XW-1:0]] ^ beta[pj[XW-1:0]]);

  gf_inverse #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(IW)) u_inv (
    .clk, .rst, .in_valid(pre_run), .a(inv_in), .tag_in(pre_idx),
    .out_valid(inv_ov), .y(inv_out), .tag_out(inv_tag)
  );

  always_ff @(posedge clk) begin
    pre_done <= 1'b0;
    if (rst) begin
      pre_run <= 1'b0;
      pre_idx <= '0;
      pi      <= VW'(1);
      pj      <= '0;
    end else if (pre_start) begin
      pre_run <= 1'b1;
      pre_idx <= '0;
      pi      <= VW'(1);
      pj      <= '0;
    end else if (pre_run) begin
      pre_idx <= pre_idx + 1'b1;
      if (pre_idx == IW'(NI - 1)) pre_run <= 1'b0;
      if (pre_idx == IW'(NP - 1)) begin      // pairs done: now 1/b_0..
        pi <= '0;
        pj <= '0;
      end else if (pi == pj) begin
        pi <= pi + 1'b1;
        pj <= pj + 1'b1;
      end else if (pj == pi - 1'b1) begin
        pi <= pi + 1'b1;
        pj <= '0;
      end else begin
        pj <= pj + 1'b1;
      end
    end
    if (inv_ov) begin
      inv_tbl[inv_tag] <= inv_out;
      if (inv_tag == IW'(NI - 1)) pre_done <= 1'b1;
    end
  end

  // ---------------- solve sequencer ----------------
  typedef enum logic [2:0] {B_IDLE, B_STEP1, B_STEP2M, B_STEP2V, B_STEP3, B_DRAIN} st_t;
  st_t st, ret;

  logic [VW-1:0] k, i;
  logic [VW:0]   outstanding;
  logic          mul_v, mul_set, mul_ov, last_op;
  logic [M-1:0]  mul_a, mul_b, mul_c;
  logic [VW:0]   mul_tag, mul_tag_out;  // {set, dest}

  // Operands of the operation issued this cycle.
  always_comb begin
    mul_v   = 1'b0;
    mul_set = 1'b0;
    mul_a   = '0;
    mul_b   = '0;
    last_op = 1'b0;
    case (st)
      B_STEP1: begin
        mul_v   = 1'b1;
        mul_a   = beta[k[XW-1:0]];
        mul_b   = x[XW'(i - 1'b1)];
        last_op = (i == k + 1'b1);
      end
      B_STEP2M: begin
        mul_v   = 1'b1;
        mul_set = 1'b1;
        mul_a   = inv_tbl[pidx(int'(i), int'(i) - int'(k) - 1)];
        mul_b   = x[i[XW-1:0]];
        last_op = (i == VW'(NV - 1));
      end
      B_STEP3: begin
        mul_v   = 1'b1;
        mul_set = 1'b1;
        mul_a   = inv_tbl[NP + int'(i)];
        mul_b   = x[i[XW-1:0]];
        last_op = (i == VW'(NV - 1));
      end
      default: ;
    endcase
  end
  assign mul_tag = {mul_set, i};

  gf_mult_systolic #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(VW + 1)) u_mul (
    .clk, .rst, .in_valid(mul_v), .a(mul_a), .b(mul_b), .tag_in(mul_tag),
    .out_valid(mul_ov), .c(mul_c), .tag_out(mul_tag_out)
  );

  always_ff @(posedge clk) begin
    solve_done <= 1'b0;
    if (rst) begin
      st           <= B_IDLE;
      ret          <= B_IDLE;
      k            <= '0;
      i            <= '0;
      outstanding  <= '0;
      stall_cycles <= '0;
      for (int v = 0; v < NV; v++) x[v] <= '0;
    end else begin
      outstanding <= outstanding + (VW+1)'(mul_v) - (VW+1)'(mul_ov);
      if (mul_ov) begin
        if (mul_tag_out[VW]) x[mul_tag_out[XW-1:0]] <= mul_c;
        else                 x[mul_tag_out[XW-1:0]] <= x[mul_tag_out[XW-1:0]] ^ mul_c;
      end
      case (st)
        B_IDLE: if (solve_start) begin
          for (int v = 0; v < NV; v++) x[v] <= rhs[v];
          k  <= '0;
          i  <= VW'(NV - 1);
          st <= B_STEP1;
        end
        B_STEP1: begin
          if (last_op) begin
            st <= B_DRAIN;
            if (k == VW'(NV - 2)) begin
              ret <= B_STEP2M;
              k   <= VW'(NV - 2);
              i   <= VW'(NV - 1);
            end else begin
              ret <= B_STEP1;
              k   <= k + 1'b1;
              i   <= VW'(NV - 1);
            end
          end else begin
            i <= i - 1'b1;
          end
        end
        B_STEP2M: begin
          if (last_op) begin
            st  <= B_DRAIN;
            ret <= B_STEP2V;
          end else begin
            i <= i + 1'b1;
          end
        end
        B_STEP2V: begin
          for (int v = 0; v < NV - 1; v++)
            if (v >= int'(k)) x[v] <= x[v] ^ x[v+1];
          if (k == '0) begin
            st <= B_STEP3;
            i  <= '0;
          end else begin
            st <= B_STEP2M;
            k  <= k - 1'b1;
            i  <= k;           // (k-1)+1
          end
        end
        B_STEP3: begin
          if (last_op) begin
            st  <= B_DRAIN;
            ret <= B_IDLE;
          end else begin
            i <= i + 1'b1;
          end
        end
        B_DRAIN: begin
          if (outstanding == '0 && !mul_ov) begin
            st <= ret;
            if (ret == B_IDLE) solve_done <= 1'b1;
          end else begin
            stall_cycles <= stall_cycles + 1'b1;
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule

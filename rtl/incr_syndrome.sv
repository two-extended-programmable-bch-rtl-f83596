// incr_syndrome: incremental syndrome unit of the EBP decoder.
//
// Flipping received bit i adds dS_i = (b_i, b_i^2, ..., b_i^(2t)) to the
// syndrome vector, b_i being the bit's locator. For each of the P extra
// locators this unit computes those 2t powers with a single power-sum unit:
// b^j = b^(j-2) * b^2, i.e. a power sum with A = b^(j-2) (A = 1 for j = 2),
// B = b and C = 0. Each power needs the one two steps before it, so the unit
// issues one operation and waits for its result (ceil(M/Q) cycles) before the
// next: P*(2t-1)*(ceil(M/Q)+1) cycles in all.
//
// Interface: `start` with beta_x valid (held until `done`); `done` pulses when
// ds is complete; ds[i][j] = beta_x[i]^(j+1). The one-unit structure follows
// the document; the issue-and-wait sequencing is this design's choice.
module incr_syndrome #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int Q    = bch_pkg::PIPE_Q,
  parameter int T    = bch_pkg::BCH_T,
  parameter int P    = bch_pkg::BCH_P
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] beta_x [P],
  output logic [M-1:0] ds     [P][2*T],
  output logic         done
);
  localparam int NS = 2 * T;
  localparam int EW = (P > 1) ? $clog2(P) : 1;
  localparam int JW = $clog2(NS + 1);

  typedef enum logic [1:0] {I_IDLE, I_ISSUE, I_WAIT} st_t;
  st_t st;

  logic [EW-1:0] e;
  logic [JW-1:0] j;        // power being computed, 2..NS
  logic          ps_v, ps_ov;
  logic [M-1:0]  ps_a, ps_p;
  logic          ps_unused_tag;

  assign ps_v = (st == I_ISSUE);
  assign ps_a = (j == JW'(2)) ? M'(1) : ds[e][j-3];

  gf_power_sum #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(1)) u_ps (
    .clk, .rst, .in_valid(ps_v), .a(ps_a), .b(beta_x[e]), .c('0),
    .tag_in(1'b0), .out_valid(ps_ov), .p(ps_p), .tag_out(ps_unused_tag)
  );

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      st <= I_IDLE;
      e  <= '0;
      j  <= JW'(2);
    end else begin
      case (st)
        I_IDLE: if (start) begin
          st <= I_ISSUE;
          e  <= '0;
          j  <= JW'(2);
          for (int i = 0; i < P; i++) ds[i][0] <= beta_x[i];
        end
        I_ISSUE: st <= I_WAIT;
        I_WAIT: if (ps_ov) begin
          ds[e][j-1] <= ps_p;
          if (j == JW'(NS)) begin
            j <= JW'(2);
            if (e == EW'(P - 1)) begin
              st   <= I_IDLE;
              done <= 1'b1;
            end else begin
              e  <= e + 1'b1;
              st <= I_ISSUE;
            end
          end else begin
            j  <= j + 1'b1;
            st <= I_ISSUE;
          end
        end
        default: st <= I_IDLE;
      endcase
    end
  end
endmodule

// gf_mult_systolic: pipelined LSB-first GF(2^M) multiplier, C = A*B mod F.
//
// The multiplier is an array of M rows. Row i adds b_i*A' to the partial
// product Y and advances A' to A'*alpha (the LSB-first algorithm: Y += b_i*A',
// A' = A'*x mod F). Each row is a line of AND/XOR cells. A register stage is
// placed after every Q rows (and after the last), so the critical path is Q
// cells, T = Q*(T_AND + T_XOR), and the latency is ceil(M/Q) cycles with one
// new product accepted every cycle. Q = 1 gives the fully pipelined
// semi-systolic array; larger Q is the "less pipelined" variant.
//
// The document states a latency of (m+1)/q for its multiplier; this array
// registers only between row groups, which gives ceil(M/Q). A TAG_W-bit tag
// travels with each operand pair so a controller can route the product.
//
// Timing: in_valid/a/b/tag_in sampled at a rising edge appear on
// out_valid/c/tag_out ceil(M/Q) cycles later. Synchronous active-high reset clears
// the valid bits only.
module gf_mult_systolic #(
  parameter int M     = bch_pkg::GF_M,
  parameter int POLY  = bch_pkg::GF_POLY,
  parameter int Q     = bch_pkg::PIPE_Q,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [M-1:0]     a,
  input  logic [M-1:0]     b,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic [M-1:0]     c,
  output logic [TAG_W-1:0] tag_out
);

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    logic [M-1:0]     ap;   // A * alpha^i
    logic [M-1:0]     y;    // partial product
    logic [M-1:0]     b;    // multiplier bits
  } row_t;

  row_t stg0;
  assign stg0 = '{v: in_valid, tag: tag_in, ap: a, y: '0, b: b};

  for (genvar i = 0; i < M; i++) begin : g_row
    row_t cur, nxt, q;
    if (i == 0) begin : g_in0
      assign cur = stg0;
    end else begin : g_in
      assign cur = g_row[i-1].q;
    end
    always_comb begin
      nxt    = cur;
      nxt.y  = cur.y ^ (cur.b[i] ? cur.ap : '0);
      nxt.ap = M'(bch_pkg::gf_mulx(16'(cur.ap), M, POLY));
    end
    if (((i + 1) % Q == 0) || (i == M - 1)) begin : g_reg
      always_ff @(posedge clk) begin
        if (rst) q.v <= 1'b0;
        else     q.v <= nxt.v;
        q.tag <= nxt.tag;
        q.ap  <= nxt.ap;
        q.y   <= nxt.y;
        q.b   <= nxt.b;
      end
    end else begin : g_wire
      assign q = nxt;
    end
  end

  assign out_valid = g_row[M-1].q.v;
  assign c         = g_row[M-1].q.y;
  assign tag_out   = g_row[M-1].q.tag;
endmodule

// gf_power_sum: pipelined polynomial-basis power-sum unit, P = A*B^2 + C.
//
// Uses the formulation P = sum_k b_k*(A*alpha^(2k)) + C: row k of the array
// holds Q(k) = A*alpha^(2k), adds b_k*Q(k) into the running sum (started at
// C) and passes Q(k)*alpha^2 to the next row. There are M rows of AND/XOR
// cells; a register stage follows every Q rows and the last one, so the
// critical path is Q rows and the latency ceil(M/Q) cycles, with one new
// operation per cycle. With A = 1 the unit squares, with C = 0 it computes
// A*B^2, the step of square-and-multiply exponentiation.
//
// The document takes this unit from the literature (m^2/q cells, latency
// m/q); the row-level register placement is this design's reading of it.
// A TAG_W-bit tag travels alongside. Synchronous active-high reset clears the
// valid bits.
module gf_power_sum #(
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
  input  logic [M-1:0]     c,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic [M-1:0]     p,
  output logic [TAG_W-1:0] tag_out
);

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    logic [M-1:0]     qk;   // A * alpha^(2k)
    logic [M-1:0]     s;    // running sum
    logic [M-1:0]     b;
  } row_t;

  row_t stg0;
  assign stg0 = '{v: in_valid, tag: tag_in, qk: a, s: c, b: b};

  for (genvar k = 0; k < M; k++) begin : g_row
    row_t cur, nxt, q;
    if (k == 0) begin : g_in0
      assign cur = stg0;
    end else begin : g_in
      assign cur = g_row[k-1].q;
    end
    always_comb begin
      nxt    = cur;
      nxt.s  = cur.s ^ (cur.b[k] ? cur.qk : '0);
      nxt.qk = M'(bch_pkg::gf_mulx(bch_pkg::gf_mulx(16'(cur.qk), M, POLY), M, POLY));
    end
    if (((k + 1) % Q == 0) || (k == M - 1)) begin : g_reg
      always_ff @(posedge clk) begin
        if (rst) q.v <= 1'b0;
        else     q.v <= nxt.v;
        q.tag <= nxt.tag;
        q.qk  <= nxt.qk;
        q.s   <= nxt.s;
        q.b   <= nxt.b;
      end
    end else begin : g_wire
      assign q = nxt;
    end
  end

  assign out_valid = g_row[M-1].q.v;
  assign p         = g_row[M-1].q.s;
  assign tag_out   = g_row[M-1].q.tag;
endmodule

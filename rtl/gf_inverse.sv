// gf_inverse: pipelined GF(2^M) inversion, Y = A^(2^M - 2) = A^-1.
//
// Square-and-multiply over the exponent 2^M-2 = 11...10b, built from M-1
// chained power-sum units, as the document's inversion unit is. Starting from
// Y = A, units 1..M-2 each compute Y = A*Y^2 (A is carried alongside through
// a matching delay line), which gives A^(2^(M-1)-1); the last unit squares
// (Y = 1*Y^2) to give A^(2^M-2). A = 0 gives 0.
//
// Timing: fully pipelined, one operand per cycle, latency (M-1)*ceil(M/Q)
// cycles. A TAG_W-bit tag travels alongside.
module gf_inverse #(
  parameter int M     = bch_pkg::GF_M,
  parameter int POLY  = bch_pkg::GF_POLY,
  parameter int Q     = bch_pkg::PIPE_Q,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [M-1:0]     a,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic [M-1:0]     y,
  output logic [TAG_W-1:0] tag_out
);
  // Each stage's tag carries the caller's tag and the original operand A.
  localparam int XW = TAG_W + M;

  logic          v   [M];
  logic [M-1:0]  val [M];
  logic [XW-1:0] x   [M];

  assign v[0]   = in_valid;
  assign val[0] = a;
  assign x[0]   = {tag_in, a};

  for (genvar s = 1; s < M; s++) begin : g_stage
    logic [M-1:0] mul_a;
    // Last stage squares only; the others multiply by A.
    assign mul_a = (s == M - 1) ? M'(1) : x[s-1][M-1:0];
    gf_power_sum #(.M(M), .POLY(POLY), .Q(Q), .TAG_W(XW)) u_ps (
      .clk, .rst,
      .in_valid (v[s-1]),
      .a        (mul_a),
      .b        (val[s-1]),
      .c        ('0),
      .tag_in   (x[s-1]),
      .out_valid(v[s]),
      .p        (val[s]),
      .tag_out  (x[s])
    );
  end

  assign out_valid = v[M-1];
  assign y         = val[M-1];
  assign tag_out   = x[M-1][XW-1:M];
endmodule

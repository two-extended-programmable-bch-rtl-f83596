// ehe_decoder: extended heuristic (EHe) BCH soft decoder.
//
// Corrects a received word of a t-error-correcting binary BCH(n,k) code using
// the reliabilities of its bits. While the word streams in (one bit and its
// reliability per cycle, r_{n-1} first), the error locator evaluator keeps the
// 2t+p least reliable bits and the syndrome unit computes the t odd
// syndromes. The EHe error magnitude solver then tries every error pattern on
// those 2t+p bits, allowing one further error anywhere in the word, and
// reports the valid pattern of least total reliability. No Chien search is
// needed: errors are reported as positions in the sorted list.
//
// Interface (follows the document's pin list, plus a reliability input and
// handshake flags chosen for this design):
//   in_valid/data_in/rel_in  one received bit (hard decision and reliability
//                            magnitude) per cycle, accepted while in_ready;
//   op_ready                 high once the word is decoded, until the first
//                            bit of the next word;
//   sorted_loc[i]            arrival index of the i-th least reliable bit
//                            (arrival index c is coefficient r_{n-1-c});
//   error_locations[i]       sorted bit i is in error;
//   extra_error_valid/extra_error  a further error at that arrival index;
//   decode_ok                a valid codeword was found.
// op_ready rises 2^(2t+p) + max(2t, p+1) + 2*(t-1)*ceil(m/q) + 5 clock edges after the
// edge that takes the last bit (81 at the defaults); words are decoded one at
// a time.
module ehe_decoder #(
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
  input  logic             in_valid,
  input  logic             data_in,
  input  logic [RW-1:0]    rel_in,
  output logic             in_ready,
  output logic             op_ready,
  output logic [M-1:0]     sorted_loc [2*T+P],
  output logic [2*T+P-1:0] error_locations,
  output logic             extra_error_valid,
  output logic [M-1:0]     extra_error,
  output logic             decode_ok,
  output logic [WW-1:0]    weight
);
  localparam int D = 2 * T + P;

  typedef enum logic [1:0] {S_RX, S_SOLVE, S_DONE} state_t;
  state_t state;

  logic          acc, first, rx_done, ems_done;
  logic [M-1:0]  count;
  logic [RW-1:0] rel  [D];
  logic [M-1:0]  beta [D];
  logic [M-1:0]  syn  [T];

  // The word is complete once n bits are in; the cycle before the
  // controller leaves S_RX must not take a further bit.
  assign in_ready = (state == S_DONE) || (state == S_RX && int'(count) != N);
  assign acc      = in_valid && in_ready;
  assign first    = (state == S_DONE) || (count == '0);
  // count is 0 only before the first word after reset.

  err_loc_eval #(.M(M), .POLY(POLY), .N(N), .D(D), .RW(RW)) u_eval (
    .clk, .rst, .in_valid(acc), .in_first(first),
    .rel_in, .count, .done(rx_done), .rel, .loc(sorted_loc), .beta
  );

  syndrome_calc #(.M(M), .POLY(POLY), .NS(T), .ODD(1'b1)) u_syn (
    .clk, .rst, .in_valid(acc), .in_first(first), .data_in, .syn
  );

  ehe_ems #(.M(M), .POLY(POLY), .Q(Q), .N(N), .T(T), .P(P), .RW(RW), .WW(WW)) u_ems (
    .clk, .rst, .start(rx_done), .beta, .rel, .syn_odd(syn),
    .done(ems_done), .found(decode_ok), .err_pattern(error_locations),
    .extra_valid(extra_error_valid), .extra_loc(extra_error), .min_weight(weight)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RX;
    end else begin
      case (state)
        S_RX:    if (rx_done)  state <= S_SOLVE;
        S_SOLVE: if (ems_done) state <= S_DONE;
        S_DONE:  if (acc)      state <= S_RX;
        default: state <= S_RX;
      endcase
    end
  end

  assign op_ready = (state == S_DONE);
endmodule

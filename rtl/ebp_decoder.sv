// ebp_decoder: extended Bjorck-Pereyra (EBP) BCH soft decoder.
//
// Corrects a received word of a t-error-correcting binary BCH(n,k) code using
// the reliabilities of its bits. While the word streams in (one bit and its
// reliability per cycle, r_{n-1} first), the error locator evaluator keeps the
// 2t+p least reliable bits and the syndrome unit computes S_1..S_2t. The EBP
// error magnitude solver then solves the Vandermonde system relating the
// syndromes to error magnitudes on the 2t least reliable bits, for every
// choice of flips among the p next least reliable bits, and reports the
// binary (valid) solution of least total reliability. No Chien search is
// needed: errors are reported as positions in the sorted list.
//
// Interface (the document's pin list, plus a reliability input and handshake
// flags chosen for this design):
//   in_valid/data_in/rel_in  one received bit (hard decision and reliability
//                            magnitude) per cycle, accepted while in_ready;
//   op_ready                 high once the word is decoded, until the first
//                            bit of the next word;
//   sorted_loc[i]            arrival index of the i-th least reliable bit
//                            (arrival index c is coefficient r_{n-1-c});
//   error_locations[i]       sorted bit i is in error;
//   decode_ok                a valid codeword was found; weight its cost.
// Words are decoded one at a time.
module ebp_decoder #(
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
  output logic             decode_ok,
  output logic [WW-1:0]    weight,
  output logic [15:0]      stall_cycles
);
  localparam int D = 2 * T + P;

  typedef enum logic [1:0] {S_RX, S_SOLVE, S_DONE} state_t;
  state_t state;

  logic          acc, first, rx_done, ems_done;
  logic [M-1:0]  count;
  logic [RW-1:0] rel  [D];
  logic [M-1:0]  beta [D];
  logic [M-1:0]  syn  [2*T];

  // The word is complete once n bits are in; the cycle before the
  // controller leaves S_RX must not take a further bit.
  assign in_ready = (state == S_DONE) || (state == S_RX && int'(count) != N);
  assign acc      = in_valid && in_ready;
  // count is 0 only before the first word after reset.
  assign first    = (state == S_DONE) || (count == '0);
  assign op_ready = (state == S_DONE);

  err_loc_eval #(.M(M), .POLY(POLY), .N(N), .D(D), .RW(RW)) u_eval (
    .clk, .rst, .in_valid(acc), .in_first(first),
    .rel_in, .count, .done(rx_done), .rel, .loc(sorted_loc), .beta
  );

  syndrome_calc #(.M(M), .POLY(POLY), .NS(2*T), .ODD(1'b0)) u_syn (
    .clk, .rst, .in_valid(acc), .in_first(first), .data_in, .syn
  );

  ebp_ems #(.M(M), .POLY(POLY), .Q(Q), .T(T), .P(P), .RW(RW), .WW(WW)) u_ems (
    .clk, .rst, .start(rx_done), .beta, .rel, .syn,
    .done(ems_done), .found(decode_ok), .err_pattern(error_locations),
    .min_weight(weight), .stall_cycles
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
endmodule

// bch_soft_decoder_top: the two least-reliable-bits BCH soft decoders side by
// side.
//
// Both decoders correct BCH(n,k,t) words (default BCH(255,239,2) over
// GF(2^8)) beyond the algebraic limit of t errors by using bit reliabilities:
// they keep the 2t+p least reliable bits and search error patterns on them
// instead of running Berlekamp-Massey and a Chien search.
//   * ehe_*: the extended heuristic decoder (EHe), exhaustive Gray-code search
//     over all 2^(2t+p) patterns plus one further error anywhere; its search
//     time grows as 2^(2t+p).
//   * ebp_*: the extended Bjorck-Pereyra decoder (EBP), p+1 Vandermonde solves
//     and a 2^p combination check; its time grows linearly with p.
// Each has its own stream input (bit, reliability, valid/ready) and result
// outputs; see ehe_decoder and ebp_decoder for the protocol. p is a
// parameter (the programmable performance/complexity trade-off).
module bch_soft_decoder_top #(
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
  // EHe decoder
  input  logic             ehe_in_valid,
  input  logic             ehe_data_in,
  input  logic [RW-1:0]    ehe_rel_in,
  output logic             ehe_in_ready,
  output logic             ehe_op_ready,
  output logic [M-1:0]     ehe_sorted_loc [2*T+P],
  output logic [2*T+P-1:0] ehe_error_locations,
  output logic             ehe_extra_error_valid,
  output logic [M-1:0]     ehe_extra_error,
  output logic             ehe_decode_ok,
  output logic [WW-1:0]    ehe_weight,
  // EBP decoder
  input  logic             ebp_in_valid,
  input  logic             ebp_data_in,
  input  logic [RW-1:0]    ebp_rel_in,
  output logic             ebp_in_ready,
  output logic             ebp_op_ready,
  output logic [M-1:0]     ebp_sorted_loc [2*T+P],
  output logic [2*T+P-1:0] ebp_error_locations,
  output logic             ebp_decode_ok,
  output logic [WW-1:0]    ebp_weight,
  output logic [15:0]      ebp_stall_cycles
);
  ehe_decoder #(.M(M), .POLY(POLY), .Q(Q), .N(N), .T(T), .P(P), .RW(RW), .WW(WW)) u_ehe (
    .clk, .rst,
    .in_valid(ehe_in_valid), .data_in(ehe_data_in), .rel_in(ehe_rel_in),
    .in_ready(ehe_in_ready), .op_ready(ehe_op_ready), .sorted_loc(ehe_sorted_loc),
    .error_locations(ehe_error_locations), .extra_error_valid(ehe_extra_error_valid),
    .extra_error(ehe_extra_error), .decode_ok(ehe_decode_ok), .weight(ehe_weight)
  );

  ebp_decoder #(.M(M), .POLY(POLY), .Q(Q), .N(N), .T(T), .P(P), .RW(RW), .WW(WW)) u_ebp (
    .clk, .rst,
    .in_valid(ebp_in_valid), .data_in(ebp_data_in), .rel_in(ebp_rel_in),
    .in_ready(ebp_in_ready), .op_ready(ebp_op_ready), .sorted_loc(ebp_sorted_loc),
    .error_locations(ebp_error_locations), .decode_ok(ebp_decode_ok),
    .weight(ebp_weight), .stall_cycles(ebp_stall_cycles)
  );
endmodule

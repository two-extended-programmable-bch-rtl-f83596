// syndrome_calc: computes the syndromes S_j = r(alpha^j) of a received word
// by Horner's rule, S_j <- S_j*alpha^j + r, one bit per cycle, highest-order
// coefficient r_{n-1} first.
//
// NS syndromes are produced. With ODD = 0 they are S_1..S_NS (the EBP decoder
// uses all 2t); with ODD = 1 they are S_1, S_3, ..., S_{2NS-1} (the EHe
// decoder needs only the odd ones, the even ones being their squares). Each
// syndrome needs one constant multiplier and one XOR: the critical path is a
// constant multiplier plus an adder. The word takes N cycles.
//
// Interface: in_first marks the first bit of a word (the register is then
// loaded with the bit instead of accumulated). syn holds the result after the
// last bit until the next word starts.
module syndrome_calc #(
  parameter int M    = bch_pkg::GF_M,
  parameter int POLY = bch_pkg::GF_POLY,
  parameter int NS   = 2 * bch_pkg::BCH_T,
  parameter bit ODD  = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         data_in,
  output logic [M-1:0] syn [NS]
);
  for (genvar j = 0; j < NS; j++) begin : g_syn
    localparam int EXP = ODD ? (2 * j + 1) : (j + 1);
    logic [M-1:0] prod;
    gf_const_mult #(.M(M), .POLY(POLY), .E(EXP)) u_cm (.x(syn[j]), .y(prod));
    always_ff @(posedge clk) begin
      if (rst)
        syn[j] <= '0;
      else if (in_valid)
        syn[j] <= (in_first ? '0 : prod) ^ M'(data_in);
    end
  end
endmodule

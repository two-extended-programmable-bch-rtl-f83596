// gf_adder: GF(2^M) adder, C = A + B, which in characteristic 2 is the
// bitwise XOR of the two coordinate vectors: M two-input XOR gates, one XOR
// delay, combinational. Subtraction is the same operation.
module gf_adder #(
  parameter int M = bch_pkg::GF_M
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  assign c = a ^ b;
endmodule

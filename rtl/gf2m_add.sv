// gf2m_add: addition unit of GF(2^m). In polynomial basis over GF(2) the sum
// of two field elements is the bitwise XOR of their coefficient vectors; no
// carry and no reduction are needed. Purely combinational.
// The addition unit is part of the original design.
//   a, b : operands (m bits)   s : a + b
module gf2m_add #(
  parameter int unsigned M = ecc_pkg::M_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);
  always_comb s = a ^ b;
endmodule

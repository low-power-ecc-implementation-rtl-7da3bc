// gf2m_sqr: squaring unit of GF(2^m), polynomial basis, one combinational pass.
// Squaring is linear over GF(2): a(x)^2 = sum a_i x^(2i), so the product is the
// input with a zero inserted between its bits (2m-1 bits). That vector is then
// reduced modulo f(x) = x^m + RPOLY from the top bit down: every set bit at
// position i >= m is cleared by adding RPOLY shifted to position i-m.
// The squaring unit is part of the original design; its combinational
// structure is this implementation's choice.
// The core uses it for the doubling and for the m-1 squarings of the inverse.
//   a : operand   y : a^2 mod f
module gf2m_sqr #(
  parameter int unsigned M     = ecc_pkg::M_DEFAULT,
  parameter logic [M-1:0] RPOLY = M'(ecc_pkg::koblitz_rpoly(M))
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  logic [2*M-2:0] t;

  always_comb begin
    t = '0;
    for (int i = 0; i < M; i++) t[2*i] = a[i];
    for (int i = 2*M-2; i >= M; i--) begin
      t[i-M +: M] = t[i-M +: M] ^ (RPOLY & {M{t[i]}});
      t[i] = 1'b0;
    end
    y = t[M-1:0];
  end
endmodule

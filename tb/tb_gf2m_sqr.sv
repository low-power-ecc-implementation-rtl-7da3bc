// tb_gf2m_sqr: squares random elements of GF(2^163) and GF(2^17) and compares
// with the reference shift-and-add product a*a; also checks that squaring m
// times returns the input (Frobenius map of order m).
module tb_gf2m_sqr;
  import ecc_ref_pkg::*;
  localparam int unsigned M = 163;
  localparam int unsigned MS = 17;
  logic [M-1:0] a, y;
  logic [MS-1:0] as, ys;
  int checks = 0, failures = 0;
  fe_t rp, rps, v;

  gf2m_sqr #(.M(M))  dut   (.a(a),  .y(y));
  gf2m_sqr #(.M(MS)) dut_s (.a(as), .y(ys));

  initial begin
    rp = fe_t'(ecc_pkg::koblitz_rpoly(M));
    rps = fe_t'(ecc_pkg::koblitz_rpoly(MS));
    for (int t = 0; t < 100; t++) begin
      v = rand_fe(M);
      if (t == 0) v = fe_t'(1) << (M - 1);
      a = v[M-1:0]; as = v[MS-1:0];
      #1;
      checks++; if (fe_t'(y) != gmul(v, v, M, rp)) failures++;
      checks++; if (fe_t'(ys) != gmul(v & mask(MS), v & mask(MS), MS, rps)) failures++;
    end
    v = rand_fe(M); a = v[M-1:0];
    for (int i = 0; i < M; i++) begin #1; a = y; end
    #1; checks++; if (fe_t'(a) != v) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

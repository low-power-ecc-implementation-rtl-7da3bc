// tb_gf2m_add: random operands; each sum bit is checked against the GF(2)
// addition table (a+b = 1 exactly when one of the bits is 1).
module tb_gf2m_add;
  localparam int unsigned M = 163;
  logic [M-1:0] a, b, s;
  int checks = 0, failures = 0;

  gf2m_add #(.M(M)) dut (.a(a), .b(b), .s(s));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < M; i += 32) begin a[i +: 32] = $urandom; b[i +: 32] = $urandom; end
      if (t == 0) b = a;
      #1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (s[i] != ((a[i] || b[i]) && !(a[i] && b[i]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

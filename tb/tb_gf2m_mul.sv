// tb_gf2m_mul: bit-serial (DIGIT=1) and digit-serial (DIGIT=4, 163 = 40*4+3
// so the padding is exercised) multipliers over GF(2^163) against the
// reference product. Also checks the timing: done exactly N clocks after the
// start clock, N = ceil(163/DIGIT), for one clock, and busy in between.
module tb_gf2m_mul;
  import ecc_ref_pkg::*;
  localparam int unsigned M = 163;
  logic clk = 1'b0, rst = 1'b0;
  logic start;
  logic [M-1:0] a, b, p1, p4;
  logic busy1, done1, busy4, done4;
  int checks = 0, failures = 0;
  fe_t rp, va, vb, ref_p;
  int n1, n4;
  bit s1, s4;

  always #5 clk = ~clk;

  gf2m_mul #(.M(M), .DIGIT(1)) dut1 (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                                     .busy(busy1), .done(done1), .p(p1));
  gf2m_mul #(.M(M), .DIGIT(4)) dut4 (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                                     .busy(busy4), .done(done4), .p(p4));

  initial begin
    #1 rst = 1'b1;
    rp = fe_t'(ecc_pkg::koblitz_rpoly(M));
    start = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      va = rand_fe(M); vb = rand_fe(M);
      if (t == 0) begin va = fe_t'(1) << (M-1); vb = va; end
      if (t == 1) begin vb = 1; end
      ref_p = gmul(va, vb, M, rp);
      @(negedge clk); a = va[M-1:0]; b = vb[M-1:0]; start = 1'b1;
      @(negedge clk); start = 1'b0; a = ~a; b = ~b;   // operands are captured
      n1 = 1; n4 = 1; s1 = 0; s4 = 0;
      while (!s1 || !s4) begin
        if (!s1) begin
          checks++; if (!busy1) failures++;
        end
        @(negedge clk);
        if (done1 && !s1) begin
          s1 = 1;
          checks++; if (fe_t'(p1) != ref_p) failures++;
          checks++; if (n1 != 163) begin failures++; $display("latency1 %0d", n1); end
        end
        if (done4 && !s4) begin
          s4 = 1;
          checks++; if (fe_t'(p4) != ref_p) failures++;
          checks++; if (n4 != 41) begin failures++; $display("latency4 %0d", n4); end
        end
        if (!s1) n1++;
        if (!s4) n4++;
      end
      @(negedge clk);
      checks++; if (done1 || done4 || busy1 || busy4) failures++;
      checks++; if (fe_t'(p1) != ref_p || fe_t'(p4) != ref_p) failures++;   // product held
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

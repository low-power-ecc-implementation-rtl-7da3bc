// tb_ecc_core: end-to-end test of the ECC core at its default configuration
// (K-163 field, bit-serial multiplier, clock gating on).
// Test 1 is the published K-163 test vector: P is the K-163 generator and the
// expected Q is given explicitly. Further tests compare with the reference
// affine double-and-add: k = 0 and k = n (point at infinity, (0,0)),
// k = n-1 (Q = -P), k = 1, a short scalar with many leading zeros, and random
// scalars, some on a second curve point. It counts how often each mechanism
// of the core happens and fails if one never does: leading-zero skip, ladder
// steps with k_i = 1 and with k_i = 0, the inversion, the infinity and
// negation exits, the datapath clock stopped while idle, the multiplier clock
// stopped during one-cycle operations and a register clock stopped while
// the datapath runs. The cycle count of test 1 is printed.
module tb_ecc_core;
  import ecc_ref_pkg::*;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] GX = 163'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8;
  localparam logic [M-1:0] GY = 163'h289070FB05D38FF58321F2E800536D538CCDAA3D9;
  localparam logic [M-1:0] N  = 163'h4000000000000000000020108A2E0CC0D99F8A5EF;
  localparam logic [M-1:0] K0 = 163'hFFF030001F0000FFFFF000003800000000;
  localparam logic [M-1:0] XQ0 = 163'h1C14DDAB12BC0D98BF83CE0022F305039F64FC205;
  localparam logic [M-1:0] YQ0 = 163'h06F9B20200EB3CEA80D1DB6C0FB8E6DED4A3C665C;

  logic clk_ecc = 1'b0, reset = 1'b0, start = 1'b0, done;
  logic [M-1:0] k = '0, xp = '0, yp = '0, xq, yq;
  int checks = 0, failures = 0;
  fe_t rp;
  pt_t g, p2;

  // mechanism counters
  int n_skip = 0, n_bit1 = 0, n_bit0 = 0, n_inv = 0, n_inf = 0, n_neg = 0;
  int n_dp_off = 0, n_mul_off = 0, n_reg_off = 0;

  always #5 clk_ecc = ~clk_ecc;

  ecc_core dut (.clk_ecc(clk_ecc), .reset(reset), .start(start), .k(k), .xp(xp), .yp(yp),
                .done(done), .xq(xq), .yq(yq));

  // controller state codes: 1 scan, 3 ladder, 6 inversion start, 14 -P, 15 infinity
  always @(posedge clk_ecc) if (!reset) begin
    if (int'(dut.u_ctrl.state_q) == 1 && !dut.u_ctrl.k_q[M-1] && dut.u_ctrl.bits_q != 0) n_skip++;
    if (int'(dut.u_ctrl.state_q) == 3 && dut.u_ctrl.step_q == 0 && dut.ack) begin
      if (dut.u_ctrl.kbit) n_bit1++; else n_bit0++;
    end
    if (int'(dut.u_ctrl.state_q) == 6 && dut.ack) n_inv++;
    if (int'(dut.u_ctrl.state_q) == 14 && dut.u_ctrl.step_q == 0 && dut.ack) n_neg++;
    if (int'(dut.u_ctrl.state_q) == 15 && dut.u_ctrl.step_q == 0 && dut.ack) n_inf++;
  end
  // sample the gated clocks in the middle of the high phase
  always @(posedge clk_ecc) begin
    #2;
    if (!reset) begin
      if (!dut.dp_clk) n_dp_off++;
      if (dut.dp_clk && !dut.mul_clk) n_mul_off++;
      if (dut.dp_clk && !dut.u_rf.rclk[0]) n_reg_off++;
    end
  end

  task automatic run(input logic [M-1:0] kk, input pt_t p, input logic [M-1:0] ex,
                     input logic [M-1:0] ey, input bit use_ref, output int cycles);
    pt_t q;
    if (use_ref) begin
      q  = smul(fe_t'(kk), p, fe_t'(1), M, rp);
      ex = q.x[M-1:0]; ey = q.y[M-1:0];
    end
    @(negedge clk_ecc);
    k = kk; xp = p.x[M-1:0]; yp = p.y[M-1:0]; start = 1'b1;
    @(negedge clk_ecc);
    start = 1'b0; k = '0; xp = '0; yp = '0;     // inputs only needed at start
    cycles = 1;
    checks++; if (done) failures++;
    while (!done) begin @(negedge clk_ecc); cycles++; end
    checks++;
    if (xq != ex || yq != ey) begin
      failures++;
      $display("mismatch k=%h\n  got %h %h\n  exp %h %h", kk, xq, yq, ex, ey);
    end
    repeat (20) @(negedge clk_ecc);
    checks++; if (!done || xq != ex || yq != ey) failures++;   // result held
  endtask

  int cyc;
  initial begin
    #1 reset = 1'b1;
    rp = fe_t'(ecc_pkg::koblitz_rpoly(M));
    g.x = fe_t'(GX); g.y = fe_t'(GY); g.inf = 1'b0;
    p2 = find_point(rand_fe(M), fe_t'(1), M, rp);
    checks++; if (!on_curve(p2.x, p2.y, fe_t'(1), M, rp)) failures++;
    repeat (3) @(negedge clk_ecc);
    reset = 1'b0;
    repeat (5) @(negedge clk_ecc);
    run(K0, g, XQ0, YQ0, 1'b0, cyc);
    $display("test vector: %0d cycles from start to done", cyc);
    run('0, g, '0, '0, 1'b0, cyc);
    run(N, g, '0, '0, 1'b0, cyc);
    run(N - 1, g, GX, GX ^ GY, 1'b0, cyc);
    run(163'd1, g, GX, GY, 1'b0, cyc);
    run(163'h1234, g, '0, '0, 1'b1, cyc);
    run(rand_fe(M)[M-1:0], g, '0, '0, 1'b1, cyc);
    run(rand_fe(M)[M-1:0], p2, '0, '0, 1'b1, cyc);
    $display("mechanisms: skip=%0d bit1=%0d bit0=%0d inv=%0d inf=%0d neg=%0d dp_off=%0d mul_off=%0d reg_off=%0d",
             n_skip, n_bit1, n_bit0, n_inv, n_inf, n_neg, n_dp_off, n_mul_off, n_reg_off);
    checks++; if (n_skip == 0) failures++;
    checks++; if (n_bit1 == 0) failures++;
    checks++; if (n_bit0 == 0) failures++;
    checks++; if (n_inv == 0) failures++;
    checks++; if (n_inf == 0) failures++;
    checks++; if (n_neg == 0) failures++;
    checks++; if (n_dp_off == 0) failures++;
    checks++; if (n_mul_off == 0) failures++;
    checks++; if (n_reg_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000000) @(posedge clk_ecc); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_ecc_workloads: one scalar multiplication on each of the five Koblitz
// field sizes K-163, K-233, K-283, K-409 and K-571, each core built with its
// own M (reduction polynomial chosen by ecc_pkg::koblitz_rpoly), plus a K-163
// core built without clock gating. Each curve uses a point found from a random
// x (a = 1 for K-163, a = 0 for the others, b = 1) and a random full-length
// scalar; the result is compared with affine double-and-add. The cores run in
// parallel; the cycle count of each is printed.
module tb_ecc_workloads;
  import ecc_ref_pkg::*;
  localparam int NC = 6;
  localparam int unsigned MS [NC] = '{163, 233, 283, 409, 571, 163};
  localparam logic [0:0]  CA [NC] = '{1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};

  logic clk = 1'b0, reset = 1'b0, start = 1'b0;
  fe_t  k [NC], xp [NC], yp [NC], ex [NC], ey [NC];
  fe_t  xq [NC], yq [NC];
  logic done [NC];
  int   cyc [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_core
    localparam int unsigned M = MS[c];
    logic [M-1:0] xq_c, yq_c;
    ecc_core #(.M(M), .CLOCK_GATING(c != NC - 1)) dut (
      .clk_ecc(clk), .reset(reset), .start(start),
      .k(k[c][M-1:0]), .xp(xp[c][M-1:0]), .yp(yp[c][M-1:0]),
      .done(done[c]), .xq(xq_c), .yq(yq_c));
    assign xq[c] = fe_t'(xq_c);
    assign yq[c] = fe_t'(yq_c);
  end

  initial begin
    pt_t p, q;
    fe_t rp;
    bit all;
    #1 reset = 1'b1;
    for (int c = 0; c < NC; c++) begin
      rp = fe_t'(ecc_pkg::koblitz_rpoly(MS[c]));
      p = find_point(rand_fe(MS[c]), fe_t'(CA[c]), MS[c], rp);
      k[c] = rand_fe(MS[c]);
      k[c][MS[c]-1] = 1'b1;
      q = smul(k[c], p, fe_t'(CA[c]), MS[c], rp);
      xp[c] = p.x; yp[c] = p.y; ex[c] = q.x; ey[c] = q.y;
      checks++; if (!on_curve(q.x, q.y, fe_t'(CA[c]), MS[c], rp)) failures++;
    end
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < NC; c++) cyc[c] = 0;
    do begin
      @(negedge clk);
      all = 1;
      for (int c = 0; c < NC; c++) if (!done[c]) begin cyc[c]++; all = 0; end
    end while (!all);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (xq[c] != ex[c] || yq[c] != ey[c]) begin
        failures++; $display("K-%0d core %0d: mismatch", MS[c], c);
      end
      $display("K-%0d%s: %0d cycles", MS[c], (c == NC - 1) ? " (no clock gating)" : "", cyc[c] + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

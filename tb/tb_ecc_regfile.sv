// tb_ecc_regfile: random writes, loads and reads against a shadow copy of the
// bank, for the gated and the ungated build side by side. Checks both read
// ports, that only the addressed register changes, that the load port writes
// registers 0 and 1, and that reset clears every register.
module tb_ecc_regfile;
  localparam int unsigned W = 163;
  localparam int unsigned N = 12;
  logic clk = 1'b0, rst = 1'b0;
  logic we, ld;
  logic [3:0] waddr, ra, rb;
  logic [W-1:0] wdata, lx, ly;
  logic [W-1:0] rda [2], rdb [2];
  logic [N-1:0][W-1:0] regs [2];
  logic [W-1:0] shadow [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ecc_regfile #(.W(W), .NREG(N), .GATING(g == 0)) dut (
      .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
      .ld(ld), .ld_x(lx), .ld_y(ly), .raddr_a(ra), .raddr_b(rb),
      .rdata_a(rda[g]), .rdata_b(rdb[g]), .regs_o(regs[g]));
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #1 rst = 1'b1;
    we = 0; ld = 0; waddr = 0; ra = 0; rb = 0; wdata = '0; lx = '0; ly = '0;
    @(negedge clk); @(negedge clk);
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < N; i++) begin checks++; if (regs[g][i] != '0) failures++; end
    rst = 1'b0;
    for (int i = 0; i < N; i++) shadow[i] = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = 1'($urandom); ld = ($urandom % 8 == 0);
      waddr = 4'($urandom % N); wdata = rnd(); lx = rnd(); ly = rnd();
      ra = 4'($urandom % N); rb = 4'($urandom % N);
      #1;
      for (int g = 0; g < 2; g++) begin
        checks++; if (rda[g] != shadow[ra] || rdb[g] != shadow[rb]) failures++;
      end
      if (we) shadow[waddr] = wdata;
      if (ld) begin shadow[0] = lx; shadow[1] = ly; end
      @(posedge clk); #1;
      for (int g = 0; g < 2; g++)
        for (int i = 0; i < N; i++) begin checks++; if (regs[g][i] != shadow[i]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_clock_gate: random enable patterns, changed both while clk is low and
// while it is high. Checks, cycle by cycle, that gclk pulses exactly when en
// was high just before the rising edge, that gclk never rises away from a
// rising clk edge (no glitch when en changes while clk is high), and that the
// ungated build passes every clock.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0;
  logic gclk, gclk_off;
  int checks = 0, failures = 0;
  int pulses = 0, pulses_off = 0, expected = 0;
  logic en_at_edge;

  clock_gate #(.GATING(1'b1)) dut     (.clk(clk), .en(en), .test_en(test_en), .gclk(gclk));
  clock_gate #(.GATING(1'b0)) dut_off (.clk(clk), .en(en), .test_en(test_en), .gclk(gclk_off));

  always @(posedge gclk) begin
    pulses++;
    checks++; if (clk !== 1'b1) failures++;
  end
  always @(posedge gclk_off) pulses_off++;

  initial begin
    #2;
    for (int c = 0; c < 400; c++) begin
      // clk low phase: set the enable for the coming edge
      en = 1'($urandom);
      test_en = (c % 50 == 7);
      #5;
      en_at_edge = en | test_en;
      if (en_at_edge) expected++;
      clk = 1'b1;
      #1;
      checks++; if (gclk !== en_at_edge) failures++;
      // clk high phase: toggle the enable, gclk must not follow
      en = ~en; test_en = 1'b0;
      #2;
      checks++; if (gclk !== en_at_edge) failures++;
      #2;
      clk = 1'b0;
      #1;
      checks++; if (gclk !== 1'b0) failures++;
    end
    checks++; if (pulses != expected) failures++;
    checks++; if (pulses_off != 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// clock_gate: integrated clock-gating cell (latch + AND), the "simple global
// clock gating" structure. The enable is sampled by a level-sensitive latch
// that is transparent while clk is low, so it cannot change while clk is high
// and gclk = clk & en_latched is free of glitches. test_en forces the clock
// on (scan). With GATING = 0 the cell is bypassed and gclk is clk: that is the
// ungated build of the core, in which the register enables alone (multiplexer
// feedback) hold the state.
// The gate follows the simple global clock-gating structure of the original
// design; the latch-based cell and the test_en input are standard practice.
// The latch is intended: it is the standard ICG structure, and a synthesis
// flow maps it to the library's clock-gating cell.
//   clk : free-running clock   en : enable for the next clock period
//   gclk: gated clock, rises with clk only when en was high before that edge
module clock_gate #(
  parameter bit GATING = 1'b1
) (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  if (GATING) begin : g_icg
    logic en_l;
    always_latch begin
      if (!clk) en_l = en | test_en;
    end
    assign gclk = clk & en_l;
  end else begin : g_bypass
    assign gclk = clk;
  end
endmodule

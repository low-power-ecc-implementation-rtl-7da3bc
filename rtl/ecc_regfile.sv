// ecc_regfile: register bank of the core together with its multiplexers.
// NREG registers of W bits. Write side: one write port (we/waddr/wdata) for
// the result of the current micro-operation, plus a load port that writes the
// input point (ld_x, ld_y) into registers 0 and 1 when ld is high; the load
// port wins if both address register 0 or 1. Every register keeps its value
// through an enable multiplexer; with GATING = 1 each register additionally
// gets its own clock-gating cell driven by the same enable, so a register that
// is not written sees no clock edge at all (the enable multiplexer is then
// redundant, which keeps both builds functionally identical).
// The original design carries out clock gating through a multiplexer unit;
// the register count and map are this implementation's choices.
// Read side: two combinational read ports (raddr_a/rdata_a, raddr_b/rdata_b)
// feed the operand buses of the arithmetic units; regs_o exposes all
// registers (result and zero tests). Writes take effect at the rising edge;
// reset is asynchronous, active high, and clears every register.
module ecc_regfile #(
  parameter int unsigned W      = ecc_pkg::M_DEFAULT,
  parameter int unsigned NREG   = ecc_pkg::NREG,
  parameter bit          GATING = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    we,
  input  logic [3:0]              waddr,
  input  logic [W-1:0]            wdata,
  input  logic                    ld,
  input  logic [W-1:0]            ld_x,
  input  logic [W-1:0]            ld_y,
  input  logic [3:0]              raddr_a,
  input  logic [3:0]              raddr_b,
  output logic [W-1:0]            rdata_a,
  output logic [W-1:0]            rdata_b,
  output logic [NREG-1:0][W-1:0]  regs_o
);
  logic [NREG-1:0][W-1:0] d;
  logic [NREG-1:0]        en;
  logic [NREG-1:0]        rclk;

  always_comb begin
    for (int i = 0; i < NREG; i++) begin
      en[i] = we && (waddr == 4'(i));
      d[i]  = wdata;
    end
    if (ld) begin
      en[0] = 1'b1; d[0] = ld_x;
      en[1] = 1'b1; d[1] = ld_y;
    end
  end

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    clock_gate #(.GATING(GATING)) u_cg (
      .clk(clk), .en(en[i]), .test_en(1'b0), .gclk(rclk[i])
    );
    logic [W-1:0] q;
    always_ff @(posedge rclk[i] or posedge rst) begin
      if (rst)        q <= '0;
      else if (en[i]) q <= d[i];
    end
    assign regs_o[i] = q;
  end

  assign rdata_a = (32'(raddr_a) < NREG) ? regs_o[raddr_a] : '0;
  assign rdata_b = (32'(raddr_b) < NREG) ? regs_o[raddr_b] : '0;
endmodule

// ecc_core: low-power elliptic-curve scalar multiplier Q = k.P over GF(2^m)
// for Koblitz curves y^2 + xy = x^3 + a x^2 + 1 (default m = 163, the K-163
// field x^163 + x^7 + x^6 + x^3 + 1).
// Structure: the FSM control unit (ecc_ctrl) runs a Montgomery ladder in
// Lopez-Dahab coordinates followed by an affine conversion with one
// Itoh-Tsujii inversion, as a sequence of field micro-operations. The
// datapath executes them: a register bank with its multiplexers
// (ecc_regfile), a digit-serial field multiplier (gf2m_mul), a squaring unit
// (gf2m_sqr) and an addition unit (gf2m_add); a result multiplexer selects
// what is written back.
// Low power: with CLOCK_GATING = 1 a global clock-gating cell stops the clock
// of the whole datapath while the core is idle, the multiplier has its own
// gate that is open only during a multiplication, and each register of the
// bank has a gate opened only when it is written. With CLOCK_GATING = 0 the
// same registers hold through enable multiplexers on a free-running clock.
// Interface: pulse start for one clk_ecc cycle with k, xp, yp valid; they are
// captured in that cycle. done falls in the next cycle and rises again when
// xq, yq hold the affine result; it then stays high (and xq, yq stay valid)
// until the next start. The point at infinity (k = 0, or k a multiple of the
// order of P) is returned as (0, 0). reset is asynchronous, active high.
// Provenance: the split into an FSM control unit, field multiplication,
// squaring and addition units, a multiplexer-based register bank and clock
// gating, the port list (plus start and k) and m = 163 follow the original
// design; the ladder algorithm, the schedule, the start/done protocol and the
// (0,0) encoding of infinity are choices of this implementation.
// Latency (DIGIT = 1): about (t-1)*(5*(m+1) + 7) cycles for a scalar of t
// bits, plus the leading-zero scan (one cycle per zero) and the conversion
// (19 multiplications, 9 of them in the inversion, and about m squarings); about 1.4e5 cycles for m = 163.
module ecc_core
  import ecc_pkg::*;
#(
  parameter int unsigned  M            = ecc_pkg::M_DEFAULT,
  parameter logic [M-1:0] RPOLY        = M'(ecc_pkg::koblitz_rpoly(M)),
  parameter int unsigned  DIGIT        = 1,
  parameter bit           CLOCK_GATING = 1'b1
) (
  input  logic         clk_ecc,
  input  logic         reset,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  output logic         done,
  output logic [M-1:0] xq,
  output logic [M-1:0] yq
);
  uop_t         uop;
  logic         req, ack, load, busy;
  logic         dp_clk, mul_clk;
  logic         mul_start, mul_busy, mul_done;
  logic [M-1:0] opa, opb, prod, sq, sum, wdata;
  logic [NREG-1:0][M-1:0] regs;

  ecc_ctrl #(.M(M)) u_ctrl (
    .clk(clk_ecc), .rst(reset), .start(start), .k(k), .ack(ack),
    .z1_zero(regs[R_Z1] == '0), .z2_zero(regs[R_Z2] == '0),
    .req(req), .uop(uop), .load(load), .busy(busy), .done(done)
  );

  // global gate: the datapath is clocked only while a computation runs
  clock_gate #(.GATING(CLOCK_GATING)) u_cg_dp (
    .clk(clk_ecc), .en(busy | start), .test_en(1'b0), .gclk(dp_clk)
  );

  ecc_regfile #(.W(M), .NREG(NREG), .GATING(CLOCK_GATING)) u_rf (
    .clk(dp_clk), .rst(reset),
    .we(req && ack), .waddr(uop.dst), .wdata(wdata),
    .ld(load), .ld_x(xp), .ld_y(yp),
    .raddr_a(uop.sa), .raddr_b(uop.sb), .rdata_a(opa), .rdata_b(opb),
    .regs_o(regs)
  );

  // multiplier gate: open from the start pulse until its done pulse is over
  assign mul_start = req && (uop.op == OP_MUL) && !mul_busy && !mul_done;

  clock_gate #(.GATING(CLOCK_GATING)) u_cg_mul (
    .clk(dp_clk), .en(mul_start | mul_busy | mul_done), .test_en(1'b0), .gclk(mul_clk)
  );

  gf2m_mul #(.M(M), .RPOLY(RPOLY), .DIGIT(DIGIT)) u_mul (
    .clk(mul_clk), .rst(reset), .start(mul_start), .a(opa), .b(opb),
    .busy(mul_busy), .done(mul_done), .p(prod)
  );

  gf2m_sqr #(.M(M), .RPOLY(RPOLY)) u_sqr (.a(opa), .y(sq));

  gf2m_add #(.M(M)) u_add (.a(opa), .b(opb), .s(sum));

  // result multiplexer and acknowledge
  always_comb begin
    ack = req;
    case (uop.op)
      OP_MUL:  begin wdata = prod; ack = req && mul_done; end
      OP_SQR:  wdata = sq;
      OP_ADD:  wdata = sum;
      OP_MOV:  wdata = opa;
      OP_ONE:  wdata = M'(1);
      default: wdata = opa;
    endcase
  end

  assign xq = regs[R_XQ];
  assign yq = regs[R_YQ];

  a_start_idle: assert property (@(posedge clk_ecc) disable iff (reset) start |-> !busy);
endmodule

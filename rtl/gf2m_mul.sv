// gf2m_mul: field multiplier of GF(2^m), digit-serial, most significant digit
// of b first (shift-and-add with interleaved reduction).
// Each clock it takes DIGIT bits of b and does, per bit,
//     c = c*x mod f  +  b_j * a
// where c*x mod f is a left shift followed by adding RPOLY when the bit
// shifted out was set. b is padded with zeros at the top to N*DIGIT bits,
// N = ceil(M/DIGIT). With DIGIT = 1 (default) it is the classic bit-serial
// multiplier: M clocks, one AND/XOR row and M-bit shift per clock.
// The original design names the multiplier unit only; the shift-and-add
// structure and DIGIT = 1 are this implementation's choices.
// Interface/timing: a 'start' pulse (while not busy) captures a and b; 'busy'
// is then high for N clocks; 'done' is high for exactly one clock afterwards,
// with the product on p in that clock. p holds until the next start.
// Reset is asynchronous, active high. The clock may be gated: the core only
// enables it while start, busy or done is high.
module gf2m_mul #(
  parameter int unsigned M     = ecc_pkg::M_DEFAULT,
  parameter logic [M-1:0] RPOLY = M'(ecc_pkg::koblitz_rpoly(M)),
  parameter int unsigned DIGIT = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);
  localparam int unsigned N  = (M + DIGIT - 1) / DIGIT;
  localparam int unsigned BW = N * DIGIT;
  localparam int unsigned CW = $clog2(N + 1);

  logic [M-1:0]  a_q, c_q, c_n;
  logic [BW-1:0] b_q;
  logic [CW-1:0] cnt_q;

  always_comb begin
    c_n = c_q;
    for (int j = 0; j < DIGIT; j++) begin
      c_n = {c_n[M-2:0], 1'b0} ^ (c_n[M-1] ? RPOLY : '0);
      if (b_q[BW-1-j]) c_n = c_n ^ a_q;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q   <= a;
        b_q   <= BW'(b);
        c_q   <= '0;
        cnt_q <= CW'(N);
        busy  <= 1'b1;
      end else if (busy) begin
        c_q   <= c_n;
        b_q   <= b_q << DIGIT;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = c_q;

  // a start is only honoured while idle
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule

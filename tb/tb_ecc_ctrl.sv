// tb_ecc_ctrl: the FSM control unit alone, driving a behavioural datapath
// written here from the reference field arithmetic (12 registers, one-cycle
// SQR/ADD/MOV/ONE, MUL acknowledged after a random 1..6 clocks). Runs
// K-163 scalar multiplications (the published test vector, k = 0, 1, 2, 3,
// n-1, n and random scalars, n the order of the generator) and compares the
// result with affine double-and-add. Also checks the number of
// multiplications: 5 per ladder bit plus 19 for the conversion (2 + 9 for the
// inversion + 8), and that done stays high until the next start.
module tb_ecc_ctrl;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] GX = 163'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8;
  localparam logic [M-1:0] GY = 163'h289070FB05D38FF58321F2E800536D538CCDAA3D9;
  localparam logic [M-1:0] N  = 163'h4000000000000000000020108A2E0CC0D99F8A5EF;

  logic clk = 1'b0, rst = 1'b0;
  logic start, ack, req, load, busy, done;
  logic [M-1:0] k;
  uop_t uop;
  fe_t rf [NREG];
  fe_t rp, res;
  int delay, nmul;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_ctrl #(.M(M)) dut (
    .clk(clk), .rst(rst), .start(start), .k(k), .ack(ack),
    .z1_zero(rf[R_Z1] == '0), .z2_zero(rf[R_Z2] == '0),
    .req(req), .uop(uop), .load(load), .busy(busy), .done(done));

  // behavioural datapath
  always_comb begin
    case (uop.op)
      OP_MUL:  res = gmul(rf[uop.sa], rf[uop.sb], M, rp);
      OP_SQR:  res = gmul(rf[uop.sa], rf[uop.sa], M, rp);
      OP_ADD:  res = rf[uop.sa] ^ rf[uop.sb];
      OP_MOV:  res = rf[uop.sa];
      default: res = fe_t'(1);
    endcase
    ack = req && (uop.op != OP_MUL || delay == 0);
  end

  logic [M-1:0] px, py;
  always @(posedge clk) begin
    if (load) begin rf[R_X] <= fe_t'(px); rf[R_Y] <= fe_t'(py); end
    if (req && ack) begin
      rf[uop.dst] <= res;
      if (uop.op == OP_MUL) nmul++;
    end
    if (req && uop.op == OP_MUL) delay <= (delay == 0) ? int'($urandom % 6) + 1 : delay - 1;
  end

  task automatic run(input logic [M-1:0] kk);
    pt_t p, q;
    int t;
    p.x = fe_t'(GX); p.y = fe_t'(GY); p.inf = 1'b0;
    q = smul(fe_t'(kk), p, fe_t'(1), M, rp);
    @(negedge clk);
    k = kk; px = GX; py = GY; start = 1'b1; nmul = 0;
    @(negedge clk); start = 1'b0; k = '0;
    checks++; if (done) failures++;
    while (!done) @(negedge clk);
    checks++;
    if (rf[R_XQ] != q.x || rf[R_YQ] != q.y) begin
      failures++; $display("mismatch k=%h", kk);
    end
    t = 0;
    for (int i = 0; i < M; i++) if (kk[i]) t = i + 1;
    if (t >= 1 && kk != N && kk != N - 1) begin
      checks++; if (nmul != 5 * (t - 1) + 19) begin failures++; $display("nmul %0d t %0d", nmul, t); end
    end
    repeat (3) @(negedge clk);
    checks++; if (!done || busy) failures++;
  endtask

  initial begin
    #1 rst = 1'b1;
    rp = fe_t'(koblitz_rpoly(M));
    delay = 1; start = 1'b0; k = '0; px = '0; py = '0;
    for (int i = 0; i < NREG; i++) rf[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(163'hFFF030001F0000FFFFF000003800000000);
    run('0); run(163'd1); run(163'd2); run(163'd3);
    run(N - 1); run(N);
    for (int i = 0; i < 3; i++) run(rand_fe(M)[M-1:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

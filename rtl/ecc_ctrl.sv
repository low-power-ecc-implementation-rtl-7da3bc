// ecc_ctrl: FSM control unit of the elliptic-curve core.
// It computes Q = k.P with the Montgomery ladder in Lopez-Dahab projective
// x-only coordinates and converts the result back to affine (x, y), issuing
// one field micro-operation at a time to the datapath (uop_t: operation,
// destination and two source registers, see ecc_pkg).
// Phases:
//   LOAD/SCAN  start captures k (and the datapath loads P); leading zero bits
//              of k are skipped, one bit per clock.
//   INIT       P1 = (x : 1), P2 = 2P = (x^4 + 1 : x^2).
//   LADDER     for every remaining bit k_i: P_u = P1 + P2 (Madd, 4 MUL) and
//              P_v = 2 P_v (Mdouble, 1 MUL), where u/v = 1/2 if k_i = 1 and
//              2/1 otherwise. Doubling uses b = 1 (Koblitz curves).
//   MXY        Z1 = 0 gives the point at infinity, returned as (0, 0);
//              Z2 = 0 gives Q = -P = (x, x + y); otherwise
//              x_Q = X1/Z1 and
//              y_Q = (x + x_Q)[(X1 + xZ1)(X2 + xZ2) + (x^2 + y)Z1Z2]/(xZ1Z2) + y
//              with a single inversion of xZ1Z2.
//   INV        Itoh-Tsujii inversion a^-1 = (a^(2^(m-1)-1))^2, built along
//              the binary expansion of m-1 from the multiplier and squarer.
//   DONE       'done' rises and stays high until the next start.
// The original design names an FSM control unit without describing it; the
// states, the micro-operation schedule and the algorithms are this
// implementation's choices.
// Handshake: req is high with a stable uop until ack (from the datapath) is
// seen at a rising edge; the datapath writes the result at that same edge.
// One-cycle operations are acknowledged in the clock they are issued.
// k = 0 also returns (0, 0). P must be a point of the curve with x != 0.
// busy is high from the clock after start until done rises; it is the enable
// of the global clock gate of the datapath.
module ecc_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned M = ecc_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic         ack,
  input  logic         z1_zero,
  input  logic         z2_zero,
  output logic         req,
  output uop_t         uop,
  output logic         load,
  output logic         busy,
  output logic         done
);
  localparam int unsigned IW   = $clog2(M);          // bit index width
  localparam int unsigned KW   = $clog2(M) + 1;      // holds values up to M
  localparam int unsigned MSBI = $clog2(M) - 1;      // top set bit of M-1
  localparam logic [(1<<IW)-1:0] MM1 = (1<<IW)'(M - 1);

  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_INIT, S_LADDER, S_CHECK, S_MXYA,
    S_INV_INIT, S_INV_COPY, S_INV_SQ, S_INV_MUL, S_INV_BSQ, S_INV_BMUL,
    S_INV_FIN, S_MXYB, S_NEG, S_ZERO
  } state_e;

  state_e        state_q;
  logic [4:0]    step_q;
  logic [M-1:0]  k_q;          // scalar, shifted left; current bit at M-2 in the ladder
  logic [IW-1:0] bits_q;       // ladder iterations still to do
  logic [KW-1:0] kk_q;         // Itoh-Tsujii: exponent index of the current beta
  logic [KW-1:0] cnt_q;        // Itoh-Tsujii: squarings still to do
  logic [IW-1:0] j_q;          // Itoh-Tsujii: bit of m-1 being processed

  function automatic uop_t mk(op_e op, ridx_t dst, ridx_t sa, ridx_t sb);
    uop_t u;
    u.op = op; u.dst = dst; u.sa = sa; u.sb = sb;
    return u;
  endfunction

  // length of the fixed micro-operation sequence of a state
  function automatic logic [4:0] seq_len(state_e s);
    case (s)
      S_INIT:   return 5'd5;
      S_LADDER: return 5'd12;
      S_MXYA:   return 5'd2;
      S_MXYB:   return 5'd15;
      S_NEG:    return 5'd2;
      S_ZERO:   return 5'd2;
      default:  return 5'd1;
    endcase
  endfunction

  // micro-operation issued in state s, sequence step n, ladder bit kb
  function automatic uop_t uop_of(state_e s, logic [4:0] n, logic kb);
    ridx_t ux, uz, vx, vz;
    ux = kb ? R_X1 : R_X2;  uz = kb ? R_Z1 : R_Z2;   // Madd target
    vx = kb ? R_X2 : R_X1;  vz = kb ? R_Z2 : R_Z1;   // Mdouble target
    case (s)
      S_INIT: case (n)
        5'd0:    return mk(OP_MOV, R_X1, R_X,  R_X);
        5'd1:    return mk(OP_ONE, R_Z1, R_X,  R_X);
        5'd2:    return mk(OP_SQR, R_Z2, R_X,  R_X);
        5'd3:    return mk(OP_SQR, R_X2, R_Z2, R_Z2);
        default: return mk(OP_ADD, R_X2, R_X2, R_Z1);
      endcase
      S_LADDER: case (n)
        5'd0:    return mk(OP_MUL, R_T1, ux,   vz);     // Xu Zv
        5'd1:    return mk(OP_MUL, R_T2, vx,   uz);     // Xv Zu
        5'd2:    return mk(OP_ADD, uz,   R_T1, R_T2);
        5'd3:    return mk(OP_SQR, uz,   uz,   uz);     // Zu' = (XuZv + XvZu)^2
        5'd4:    return mk(OP_MUL, R_T1, R_T1, R_T2);
        5'd5:    return mk(OP_MUL, R_T2, R_X,  uz);
        5'd6:    return mk(OP_ADD, ux,   R_T1, R_T2);   // Xu' = x Zu' + XuZv XvZu
        5'd7:    return mk(OP_SQR, vx,   vx,   vx);
        5'd8:    return mk(OP_SQR, vz,   vz,   vz);
        5'd9:    return mk(OP_ADD, R_T1, vx,   vz);
        5'd10:   return mk(OP_MUL, vz,   vx,   vz);     // Zv' = Xv^2 Zv^2
        default: return mk(OP_SQR, vx,   R_T1, R_T1);   // Xv' = Xv^4 + Zv^4
      endcase
      S_MXYA: case (n)
        5'd0:    return mk(OP_MUL, R_T1, R_Z1, R_Z2);   // Z1Z2
        default: return mk(OP_MUL, R_T2, R_X,  R_T1);   // x Z1Z2
      endcase
      S_INV_INIT: return mk(OP_MOV, R_T3, R_T2, R_T2);
      S_INV_COPY: return mk(OP_MOV, R_T4, R_T3, R_T3);
      S_INV_SQ:   return mk(OP_SQR, R_T4, R_T4, R_T4);
      S_INV_MUL:  return mk(OP_MUL, R_T3, R_T3, R_T4);
      S_INV_BSQ:  return mk(OP_SQR, R_T3, R_T3, R_T3);
      S_INV_BMUL: return mk(OP_MUL, R_T3, R_T3, R_T2);
      S_INV_FIN:  return mk(OP_SQR, R_T3, R_T3, R_T3);  // T3 = (xZ1Z2)^-1
      S_MXYB: case (n)
        5'd0:    return mk(OP_MUL, R_T2, R_X,  R_Z2);   // x Z2
        5'd1:    return mk(OP_MUL, R_T4, R_X1, R_T2);   // X1 x Z2
        5'd2:    return mk(OP_MUL, R_XQ, R_T4, R_T3);   // xQ = X1/Z1
        5'd3:    return mk(OP_ADD, R_T2, R_X2, R_T2);   // X2 + xZ2
        5'd4:    return mk(OP_MUL, R_T4, R_X,  R_Z1);
        5'd5:    return mk(OP_ADD, R_T4, R_X1, R_T4);   // X1 + xZ1
        5'd6:    return mk(OP_MUL, R_T2, R_T2, R_T4);
        5'd7:    return mk(OP_SQR, R_T4, R_X,  R_X);
        5'd8:    return mk(OP_ADD, R_T4, R_T4, R_Y);    // x^2 + y
        5'd9:    return mk(OP_MUL, R_T4, R_T4, R_T1);
        5'd10:   return mk(OP_ADD, R_T2, R_T2, R_T4);
        5'd11:   return mk(OP_MUL, R_T2, R_T2, R_T3);
        5'd12:   return mk(OP_ADD, R_T4, R_X,  R_XQ);   // x + xQ
        5'd13:   return mk(OP_MUL, R_T2, R_T2, R_T4);
        default: return mk(OP_ADD, R_YQ, R_T2, R_Y);
      endcase
      S_NEG: case (n)
        5'd0:    return mk(OP_MOV, R_XQ, R_X,  R_X);
        default: return mk(OP_ADD, R_YQ, R_X,  R_Y);
      endcase
      S_ZERO: case (n)
        5'd0:    return mk(OP_ADD, R_XQ, R_X,  R_X);
        default: return mk(OP_ADD, R_YQ, R_X,  R_X);
      endcase
      default: return mk(OP_MOV, R_T1, R_T1, R_T1);
    endcase
  endfunction

  logic kbit, last;
  assign kbit = k_q[M-2];
  assign last = (step_q == seq_len(state_q) - 5'd1);

  always_comb begin
    req  = !(state_q inside {S_IDLE, S_SCAN, S_CHECK});
    uop  = uop_of(state_q, step_q, kbit);
    load = (state_q == S_IDLE) && start;
    busy = (state_q != S_IDLE);
  end

  // after bit j_q of m-1: next bit of the inversion chain, or the final square
  state_e inv_next;
  assign inv_next = (j_q == '0) ? S_INV_FIN : S_INV_COPY;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= S_IDLE;
      step_q  <= '0;
      k_q     <= '0;
      bits_q  <= '0;
      kk_q    <= '0;
      cnt_q   <= '0;
      j_q     <= '0;
      done    <= 1'b0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          k_q     <= k;
          bits_q  <= IW'(M - 1);
          step_q  <= '0;
          done    <= 1'b0;
          state_q <= S_SCAN;
        end
        S_SCAN: begin
          if (k_q[M-1])           state_q <= S_INIT;
          else if (bits_q == '0)  state_q <= S_ZERO;
          else begin
            k_q    <= k_q << 1;
            bits_q <= bits_q - 1'b1;
          end
        end
        S_CHECK: begin
          step_q <= '0;
          if (z1_zero)      state_q <= S_ZERO;
          else if (z2_zero) state_q <= S_NEG;
          else              state_q <= S_MXYA;
        end
        S_INIT, S_LADDER, S_MXYA, S_MXYB, S_NEG, S_ZERO: if (ack) begin
          if (!last) step_q <= step_q + 5'd1;
          else begin
            step_q <= '0;
            case (state_q)
              S_INIT, S_LADDER: begin
                if (state_q == S_LADDER) begin
                  k_q    <= k_q << 1;
                  bits_q <= bits_q - 1'b1;
                end
                if ((state_q == S_INIT && bits_q == '0) ||
                    (state_q == S_LADDER && bits_q == IW'(1)))
                  state_q <= S_CHECK;
                else
                  state_q <= S_LADDER;
              end
              S_MXYA: begin
                state_q <= S_INV_INIT;
              end
              default: begin               // MXYB, NEG, ZERO: result written
                state_q <= S_IDLE;
                done    <= 1'b1;
              end
            endcase
          end
        end
        S_INV_INIT: if (ack) begin
          kk_q <= KW'(1);
          j_q  <= IW'(MSBI - 1);
          state_q <= (MSBI == 0) ? S_INV_FIN : S_INV_COPY;
        end
        S_INV_COPY: if (ack) begin
          cnt_q   <= kk_q;
          state_q <= S_INV_SQ;
        end
        S_INV_SQ: if (ack) begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == KW'(1)) state_q <= S_INV_MUL;
        end
        S_INV_MUL: if (ack) begin
          kk_q <= kk_q << 1;
          if (MM1[j_q]) state_q <= S_INV_BSQ;
          else begin
            state_q <= inv_next;
            j_q     <= j_q - 1'b1;
          end
        end
        S_INV_BSQ: if (ack) state_q <= S_INV_BMUL;
        S_INV_BMUL: if (ack) begin
          kk_q    <= kk_q + 1'b1;
          state_q <= inv_next;
          j_q     <= j_q - 1'b1;
        end
        S_INV_FIN: if (ack) begin
          step_q  <= '0;
          state_q <= S_MXYB;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the micro-operation must not change while it waits for its acknowledge
  a_req_stable: assert property (@(posedge clk) disable iff (rst)
                                 req && !ack |=> req && $stable(uop));
endmodule

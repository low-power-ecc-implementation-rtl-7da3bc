// ecc_pkg: constants and types shared by the GF(2^m) elliptic-curve core.
//
// The core works on Koblitz curves y^2 + xy = x^3 + a x^2 + 1 over GF(2^m) in
// polynomial basis. koblitz_rpoly(m) returns the reduction polynomial f(x)
// without its x^m term for the five standard Koblitz field sizes
// (163, 233, 283, 409, 571; the NIST values) and for two small fields (7, 17)
// that keep block-level simulations short. The field size 163 is the main one.
//
// The datapath executes one micro-operation at a time on a bank of NREG
// registers of m bits; uop_t is what the controller issues to it.
package ecc_pkg;

  parameter int unsigned MAX_M     = 571;
  parameter int unsigned M_DEFAULT = 163;

  // reduction polynomial f(x) - x^m, zero for an unsupported m
  function automatic logic [MAX_M-1:0] koblitz_rpoly(input int unsigned m);
    logic [MAX_M-1:0] r;
    r = '0;
    case (m)
      7:   begin r[1] = 1'b1; r[0] = 1'b1; end                                  // x^7+x+1
      17:  begin r[3] = 1'b1; r[0] = 1'b1; end                                  // x^17+x^3+1
      163: begin r[7] = 1'b1; r[6] = 1'b1; r[3] = 1'b1; r[0] = 1'b1; end        // x^163+x^7+x^6+x^3+1
      233: begin r[74] = 1'b1; r[0] = 1'b1; end                                 // x^233+x^74+1
      283: begin r[12] = 1'b1; r[7] = 1'b1; r[5] = 1'b1; r[0] = 1'b1; end       // x^283+x^12+x^7+x^5+1
      409: begin r[87] = 1'b1; r[0] = 1'b1; end                                 // x^409+x^87+1
      571: begin r[10] = 1'b1; r[5] = 1'b1; r[2] = 1'b1; r[0] = 1'b1; end       // x^571+x^10+x^5+x^2+1
      default: r = '0;
    endcase
    return r;
  endfunction

  // datapath micro-operations
  typedef enum logic [2:0] {
    OP_MUL = 3'd0,   // dst = A * B        (multi-cycle, field multiplier)
    OP_SQR = 3'd1,   // dst = A^2          (one cycle, squaring unit)
    OP_ADD = 3'd2,   // dst = A + B        (one cycle, addition unit)
    OP_MOV = 3'd3,   // dst = A            (one cycle)
    OP_ONE = 3'd4    // dst = 1            (one cycle)
  } op_e;

  // register bank map
  parameter int unsigned NREG = 12;
  typedef logic [3:0] ridx_t;
  parameter ridx_t R_X  = 4'd0;   // x of the input point P
  parameter ridx_t R_Y  = 4'd1;   // y of the input point P
  parameter ridx_t R_X1 = 4'd2;   // ladder point P1 = (X1:Z1)
  parameter ridx_t R_Z1 = 4'd3;
  parameter ridx_t R_X2 = 4'd4;   // ladder point P2 = (X2:Z2) = P1 + P
  parameter ridx_t R_Z2 = 4'd5;
  parameter ridx_t R_T1 = 4'd6;   // temporaries
  parameter ridx_t R_T2 = 4'd7;
  parameter ridx_t R_T3 = 4'd8;
  parameter ridx_t R_T4 = 4'd9;
  parameter ridx_t R_XQ = 4'd10;  // result Q = k.P, affine
  parameter ridx_t R_YQ = 4'd11;

  typedef struct packed {
    op_e   op;
    ridx_t dst;
    ridx_t sa;
    ridx_t sb;
  } uop_t;

endpackage

// ecc_pkg: register map and microcode of the dual-field ECC arithmetic unit.
//
// A point operation is a short program of field operations on a 16-entry
// register file. Registers 0..6 are loaded with the operands, 7..9 receive
// the result and 10..15 are temporaries:
//   R_X1,R_Y1,R_Z1  projective input point P (Lopez-Dahab in GF(2^m),
//                   Jacobian in GF(p))
//   R_X2,R_Y2       affine input point for the mixed addition
//   R_A,R_B         curve coefficients a, b
//   R_X3,R_Y3,R_Z3  projective result
// Each microinstruction is {op, dst, src1, src2}; F_ADD and F_SUB are
// exclusive-or in GF(2^m), F_HALF (division by 2) is used only in GF(p).
//
// Programs (entry addresses from prog_entry):
//   binary addition  (Lopez-Dahab mixed coordinates), 15 mul +  9 add
//   binary doubling  (Lopez-Dahab),                     10 mul +  4 add
//   prime addition   (Jacobian + affine),               11 mul +  9 add/sub/half
//   prime doubling   (Jacobian),                        10 mul + 13 add/sub
// The formulas are the document's, with two corrections described in the
// README: the prime addition uses H*C^3 and the binary doubling uses
// Y4 = bZ1^4*Z4 + X4*(a*Z4 + Y1^2 + bZ1^4).
package ecc_pkg;
  import vedic_pkg::*;

  typedef enum logic [2:0] {
    F_NOP  = 3'd0,
    F_ADD  = 3'd1,
    F_SUB  = 3'd2,
    F_MUL  = 3'd3,
    F_HALF = 3'd4,
    F_END  = 3'd5
  } fop_e;

  typedef struct packed {
    fop_e       op;
    logic [3:0] d;
    logic [3:0] s1;
    logic [3:0] s2;
  } uinstr_t;

  localparam int unsigned NREG    = 16;
  localparam int unsigned NLOAD   = 7;
  localparam logic [3:0] R_X1 = 4'd0,  R_Y1 = 4'd1,  R_Z1 = 4'd2;
  localparam logic [3:0] R_X2 = 4'd3,  R_Y2 = 4'd4;
  localparam logic [3:0] R_A  = 4'd5,  R_B  = 4'd6;
  localparam logic [3:0] R_X3 = 4'd7,  R_Y3 = 4'd8,  R_Z3 = 4'd9;
  localparam logic [3:0] T0 = 4'd10, T1 = 4'd11, T2 = 4'd12, T3 = 4'd13, T4 = 4'd14, T5 = 4'd15;

  localparam logic [6:0] PC_BIN_ADD = 7'd0;
  localparam logic [6:0] PC_BIN_DBL = 7'd25;
  localparam logic [6:0] PC_PRI_ADD = 7'd40;
  localparam logic [6:0] PC_PRI_DBL = 7'd61;

  function automatic logic [6:0] prog_entry(input field_e f, input ec_op_e o);
    case ({f, o})
      {FIELD_BINARY, EC_ADD}: return PC_BIN_ADD;
      {FIELD_BINARY, EC_DBL}: return PC_BIN_DBL;
      {FIELD_PRIME,  EC_ADD}: return PC_PRI_ADD;
      default:                return PC_PRI_DBL;
    endcase
  endfunction

  function automatic uinstr_t ui(input fop_e op, input logic [3:0] d,
                                 input logic [3:0] s1, input logic [3:0] s2);
    return '{op: op, d: d, s1: s1, s2: s2};
  endfunction

  function automatic uinstr_t ucode(input logic [6:0] pc);
    case (pc)
      // ---- GF(2^m) mixed addition R = Q + A, Q=(X1,Y1,Z1) LD, A=(x2,y2)
      7'd0:  return ui(F_MUL, T0,   R_Z1, R_Z1);  // Z1^2
      7'd1:  return ui(F_MUL, T0,   R_Y2, T0);    // y2*Z1^2
      7'd2:  return ui(F_ADD, T1,   R_Y1, T0);    // A = Y1 + y2*Z1^2
      7'd3:  return ui(F_MUL, T0,   R_X2, R_Z1);  // x2*Z1
      7'd4:  return ui(F_ADD, T2,   R_X1, T0);    // B = X1 + x2*Z1
      7'd5:  return ui(F_MUL, T3,   T2,   R_Z1);  // C = B*Z1
      7'd6:  return ui(F_MUL, R_Z3, T3,   T3);    // Z3 = C^2
      7'd7:  return ui(F_MUL, T4,   R_X2, R_Z3);  // D = x2*Z3
      7'd8:  return ui(F_MUL, T0,   T2,   T2);    // B^2
      7'd9:  return ui(F_ADD, T5,   T1,   T0);    // A + B^2
      7'd10: return ui(F_MUL, T0,   R_A,  T3);    // a*C
      7'd11: return ui(F_ADD, T5,   T5,   T0);    // E = A + B^2 + a*C
      7'd12: return ui(F_MUL, T0,   T1,   T1);    // A^2
      7'd13: return ui(F_MUL, R_X3, T3,   T5);    // C*E
      7'd14: return ui(F_ADD, R_X3, T0,   R_X3);  // X3 = A^2 + C*E
      7'd15: return ui(F_ADD, T4,   T4,   R_X3);  // I = D + X3
      7'd16: return ui(F_MUL, T0,   T1,   T3);    // A*C
      7'd17: return ui(F_ADD, T0,   T0,   R_Z3);  // J = A*C + Z3
      7'd18: return ui(F_MUL, T5,   T4,   T0);    // F = I*J
      7'd19: return ui(F_MUL, T0,   R_Z3, R_Z3);  // K = Z3^2
      7'd20: return ui(F_MUL, T1,   R_X2, T0);    // x2*K
      7'd21: return ui(F_MUL, T2,   R_Y2, T0);    // y2*K
      7'd22: return ui(F_ADD, R_Y3, T5,   T1);
      7'd23: return ui(F_ADD, R_Y3, R_Y3, T2);    // Y3 = F + x2*K + y2*K
      7'd24: return ui(F_END, 4'd0, 4'd0, 4'd0);
      // ---- GF(2^m) doubling R = 2P, P=(X1,Y1,Z1) LD
      7'd25: return ui(F_MUL, T0,   R_Z1, R_Z1);  // Z1^2
      7'd26: return ui(F_MUL, T1,   R_X1, R_X1);  // X1^2
      7'd27: return ui(F_MUL, R_Z3, T0,   T1);    // Z3 = Z1^2*X1^2
      7'd28: return ui(F_MUL, T0,   T0,   T0);    // Z1^4
      7'd29: return ui(F_MUL, T0,   R_B,  T0);    // bZ1^4
      7'd30: return ui(F_MUL, T1,   T1,   T1);    // X1^4
      7'd31: return ui(F_ADD, R_X3, T1,   T0);    // X3 = X1^4 + bZ1^4
      7'd32: return ui(F_MUL, T2,   R_Y1, R_Y1);  // Y1^2
      7'd33: return ui(F_MUL, T3,   R_A,  R_Z3);  // a*Z3
      7'd34: return ui(F_ADD, T2,   T2,   T3);
      7'd35: return ui(F_ADD, T2,   T2,   T0);    // Y1^2 + a*Z3 + bZ1^4
      7'd36: return ui(F_MUL, T2,   T2,   R_X3);
      7'd37: return ui(F_MUL, T3,   T0,   R_Z3);  // bZ1^4*Z3
      7'd38: return ui(F_ADD, R_Y3, T2,   T3);
      7'd39: return ui(F_END, 4'd0, 4'd0, 4'd0);
      // ---- GF(p) mixed addition R = P + A, P=(X1,Y1,Z1) Jacobian, A=(x2,y2)
      7'd40: return ui(F_MUL, T0,   R_Z1, R_Z1);  // Z1^2
      7'd41: return ui(F_MUL, T1,   R_X2, T0);    // B = x2*Z1^2
      7'd42: return ui(F_MUL, T2,   T0,   R_Z1);  // Z1^3
      7'd43: return ui(F_MUL, T2,   R_Y2, T2);    // E = y2*Z1^3
      7'd44: return ui(F_SUB, T3,   R_X1, T1);    // C = A - B
      7'd45: return ui(F_SUB, T4,   R_Y1, T2);    // F = D - E
      7'd46: return ui(F_ADD, T5,   R_X1, T1);    // G = A + B
      7'd47: return ui(F_ADD, T1,   R_Y1, T2);    // H = D + E
      7'd48: return ui(F_MUL, R_Z3, R_Z1, T3);    // Z3 = Z1*C
      7'd49: return ui(F_MUL, T0,   T3,   T3);    // C^2
      7'd50: return ui(F_MUL, T2,   T5,   T0);    // G*C^2
      7'd51: return ui(F_MUL, R_X3, T4,   T4);    // F^2
      7'd52: return ui(F_SUB, R_X3, R_X3, T2);    // X3 = F^2 - G*C^2
      7'd53: return ui(F_SUB, T2,   T2,   R_X3);
      7'd54: return ui(F_SUB, T2,   T2,   R_X3);  // I = G*C^2 - 2*X3
      7'd55: return ui(F_MUL, T2,   T2,   T4);    // I*F
      7'd56: return ui(F_MUL, T0,   T0,   T3);    // C^3
      7'd57: return ui(F_MUL, T0,   T1,   T0);    // H*C^3
      7'd58: return ui(F_SUB, R_Y3, T2,   T0);
      7'd59: return ui(F_HALF, R_Y3, R_Y3, R_Y3); // Y3 = (I*F - H*C^3)/2
      7'd60: return ui(F_END, 4'd0, 4'd0, 4'd0);
      // ---- GF(p) doubling Q = 2P, P=(X1,Y1,Z1) Jacobian
      7'd61: return ui(F_MUL, T0,   R_X1, R_X1);  // X1^2
      7'd62: return ui(F_ADD, T1,   T0,   T0);
      7'd63: return ui(F_ADD, T0,   T1,   T0);    // 3*X1^2
      7'd64: return ui(F_MUL, T1,   R_Z1, R_Z1);  // Z1^2
      7'd65: return ui(F_MUL, T1,   T1,   T1);    // Z1^4
      7'd66: return ui(F_MUL, T1,   R_A,  T1);    // a*Z1^4
      7'd67: return ui(F_ADD, T0,   T0,   T1);    // A = 3*X1^2 + a*Z1^4
      7'd68: return ui(F_MUL, T1,   R_Y1, R_Y1);  // Y1^2
      7'd69: return ui(F_MUL, T2,   R_X1, T1);    // X1*Y1^2
      7'd70: return ui(F_ADD, T2,   T2,   T2);
      7'd71: return ui(F_ADD, T2,   T2,   T2);    // B = 4*X1*Y1^2
      7'd72: return ui(F_MUL, R_X3, T0,   T0);    // A^2
      7'd73: return ui(F_SUB, R_X3, R_X3, T2);
      7'd74: return ui(F_SUB, R_X3, R_X3, T2);    // X4 = A^2 - 2*B
      7'd75: return ui(F_MUL, T3,   R_Y1, R_Z1);  // Y1*Z1
      7'd76: return ui(F_ADD, R_Z3, T3,   T3);    // Z4 = 2*Y1*Z1
      7'd77: return ui(F_MUL, T1,   T1,   T1);    // Y1^4
      7'd78: return ui(F_ADD, T1,   T1,   T1);
      7'd79: return ui(F_ADD, T1,   T1,   T1);
      7'd80: return ui(F_ADD, T1,   T1,   T1);    // C = 8*Y1^4
      7'd81: return ui(F_SUB, T3,   T2,   R_X3);  // B - X4
      7'd82: return ui(F_MUL, T3,   T0,   T3);    // A*(B - X4)
      7'd83: return ui(F_SUB, R_Y3, T3,   T1);    // Y4 = A*(B - X4) - C
      default: return ui(F_END, 4'd0, 4'd0, 4'd0);
    endcase
  endfunction

endpackage

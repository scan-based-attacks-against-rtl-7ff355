// Field, register and microprogram definitions for the GF(2^163) elliptic
// curve point multiplier.
//
// Field: GF(2^163) in polynomial basis with f(z) = z^163 + z^7 + z^6 + z^3 + 1
// (the NIST binary-field pentanomial; the document gives only the 163-bit
// key size). POLY_LOW holds the terms of f below z^163.
//
// The point multiplier runs a microprogram over a register file of 13 field
// elements. Each instruction names an operation of the field units (adder,
// multiplier, squarer), a destination and up to two sources. Instructions
// marked `sw` belong to the ladder loop body; when the current key bit is 0
// the roles of (X1,Z1) and (X2,Z2) are exchanged by flipping address bit 1
// of registers 0..3, so one loop body serves both branches of the ladder.
package ecc_pkg;

  localparam int M = 163;
  localparam logic [M-1:0] POLY_LOW = M'('hC9);  // z^7 + z^6 + z^3 + 1

  typedef logic [M-1:0] fe_t;

  // register file addresses
  typedef enum logic [3:0] {
    R_X1 = 4'd0, R_Z1 = 4'd1, R_X2 = 4'd2, R_Z2 = 4'd3,
    R_X  = 4'd4, R_Y  = 4'd5, R_B  = 4'd6,
    R_T1 = 4'd7, R_T2 = 4'd8, R_T3 = 4'd9, R_T4 = 4'd10, R_T5 = 4'd11, R_T6 = 4'd12
  } reg_e;
  localparam int NR = 13;

  typedef enum logic [2:0] {
    OP_MOV  = 3'd0,   // dst = a
    OP_ONE  = 3'd1,   // dst = 1
    OP_ADD  = 3'd2,   // dst = a + b          (1 cycle)
    OP_SQR  = 3'd3,   // dst = a^(2^n)        (n cycles)
    OP_MUL  = 3'd4,   // dst = a * b          (ceil(163/D) cycles)
    OP_NEXT = 3'd5,   // next key bit: loop back or fall through
    OP_END  = 3'd6    // point multiplication finished
  } op_e;

  typedef struct packed {
    op_e        op;
    reg_e       dst;
    reg_e       a;
    reg_e       b;
    logic [6:0] n;    // repeat count of OP_SQR
    logic       sw;   // ladder body: registers 0..3 follow the key bit
  } instr_t;

  localparam logic [5:0] PC_LOOP = 6'd5;

  function automatic instr_t ins(op_e op, reg_e dst, reg_e a, reg_e b, logic [6:0] n = 7'd1, bit sw = 0);
    instr_t i;
    i.op = op; i.dst = dst; i.a = a; i.b = b; i.n = n; i.sw = sw;
    return i;
  endfunction

  // Montgomery ladder in Lopez-Dahab projective coordinates (x-only), then
  // conversion to affine x and y with one inversion (Itoh-Tsujii chain
  // 1,2,4,8,16,32,64,128,160,162 for a^(2^163-2)).
  function automatic instr_t program_rom(logic [5:0] pc);
    case (pc)
      // initial points: (X1,Z1) = P, (X2,Z2) = 2P
      6'd0:  return ins(OP_MOV, R_X1, R_X,  R_X);
      6'd1:  return ins(OP_ONE, R_Z1, R_X,  R_X);
      6'd2:  return ins(OP_SQR, R_Z2, R_X,  R_X);          // x^2
      6'd3:  return ins(OP_SQR, R_X2, R_Z2, R_Z2);         // x^4
      6'd4:  return ins(OP_ADD, R_X2, R_X2, R_B);          // x^4 + b
      // loop body: Madd(X1,Z1,X2,Z2) then Mdouble(X2,Z2) (swapped for k_i = 0)
      6'd5:  return ins(OP_MUL, R_T1, R_X1, R_Z2, 7'd1, 1);   // X1 Z2
      6'd6:  return ins(OP_MUL, R_T2, R_X2, R_Z1, 7'd1, 1);   // X2 Z1
      6'd7:  return ins(OP_ADD, R_Z1, R_T1, R_T2, 7'd1, 1);
      6'd8:  return ins(OP_SQR, R_Z1, R_Z1, R_Z1, 7'd1, 1);   // Z1 = (X1Z2 + X2Z1)^2
      6'd9:  return ins(OP_MUL, R_T1, R_T1, R_T2, 7'd1, 1);   // X1Z2 X2Z1
      6'd10: return ins(OP_MUL, R_T2, R_X,  R_Z1, 7'd1, 1);   // x Z1
      6'd11: return ins(OP_ADD, R_X1, R_T1, R_T2, 7'd1, 1);   // X1
      6'd12: return ins(OP_SQR, R_T1, R_Z2, R_Z2, 7'd1, 1);   // Z^2
      6'd13: return ins(OP_SQR, R_T2, R_X2, R_X2, 7'd1, 1);   // X^2
      6'd14: return ins(OP_MUL, R_Z2, R_T1, R_T2, 7'd1, 1);   // Z = X^2 Z^2
      6'd15: return ins(OP_SQR, R_T1, R_T1, R_T1, 7'd1, 1);   // Z^4
      6'd16: return ins(OP_MUL, R_T1, R_B,  R_T1, 7'd1, 1);   // b Z^4
      6'd17: return ins(OP_SQR, R_T2, R_T2, R_T2, 7'd1, 1);   // X^4
      6'd18: return ins(OP_ADD, R_X2, R_T1, R_T2, 7'd1, 1);   // X = X^4 + b Z^4
      6'd19: return ins(OP_NEXT, R_X1, R_X1, R_X1);
      // conversion to affine coordinates
      6'd20: return ins(OP_MUL, R_T1, R_Z1, R_Z2);         // Z1 Z2
      6'd21: return ins(OP_MUL, R_T2, R_X,  R_T1);         // x Z1 Z2
      6'd22: return ins(OP_SQR, R_T3, R_T2, R_T2, 1);
      6'd23: return ins(OP_MUL, R_T3, R_T3, R_T2);         // b2
      6'd24: return ins(OP_SQR, R_T4, R_T3, R_T3, 2);
      6'd25: return ins(OP_MUL, R_T4, R_T4, R_T3);         // b4
      6'd26: return ins(OP_SQR, R_T5, R_T4, R_T4, 4);
      6'd27: return ins(OP_MUL, R_T5, R_T5, R_T4);         // b8
      6'd28: return ins(OP_SQR, R_T4, R_T5, R_T5, 8);
      6'd29: return ins(OP_MUL, R_T4, R_T4, R_T5);         // b16
      6'd30: return ins(OP_SQR, R_T5, R_T4, R_T4, 16);
      6'd31: return ins(OP_MUL, R_T5, R_T5, R_T4);         // b32
      6'd32: return ins(OP_SQR, R_T4, R_T5, R_T5, 32);
      6'd33: return ins(OP_MUL, R_T4, R_T4, R_T5);         // b64
      6'd34: return ins(OP_SQR, R_T6, R_T4, R_T4, 64);
      6'd35: return ins(OP_MUL, R_T6, R_T6, R_T4);         // b128
      6'd36: return ins(OP_SQR, R_T6, R_T6, R_T6, 32);
      6'd37: return ins(OP_MUL, R_T6, R_T6, R_T5);         // b160
      6'd38: return ins(OP_SQR, R_T6, R_T6, R_T6, 2);
      6'd39: return ins(OP_MUL, R_T6, R_T6, R_T3);         // b162
      6'd40: return ins(OP_SQR, R_T2, R_T6, R_T6, 1);      // (x Z1 Z2)^-1
      6'd41: return ins(OP_MUL, R_T3, R_X,  R_Z2);         // x Z2
      6'd42: return ins(OP_MUL, R_T4, R_T3, R_T2);         // 1/Z1
      6'd43: return ins(OP_MUL, R_T4, R_X1, R_T4);         // x3 = X1/Z1
      6'd44: return ins(OP_MUL, R_T5, R_X,  R_Z1);         // x Z1
      6'd45: return ins(OP_ADD, R_T5, R_X1, R_T5);         // X1 + x Z1
      6'd46: return ins(OP_ADD, R_T6, R_X2, R_T3);         // X2 + x Z2
      6'd47: return ins(OP_MUL, R_T5, R_T5, R_T6);
      6'd48: return ins(OP_SQR, R_T6, R_X,  R_X, 1);       // x^2
      6'd49: return ins(OP_ADD, R_T6, R_T6, R_Y);          // x^2 + y
      6'd50: return ins(OP_MUL, R_T6, R_T6, R_T1);         // (x^2 + y) Z1 Z2
      6'd51: return ins(OP_ADD, R_T5, R_T5, R_T6);
      6'd52: return ins(OP_MUL, R_T5, R_T5, R_T2);
      6'd53: return ins(OP_ADD, R_T6, R_X,  R_T4);         // x + x3
      6'd54: return ins(OP_MUL, R_T5, R_T5, R_T6);
      6'd55: return ins(OP_ADD, R_T5, R_T5, R_Y);          // y3
      default: return ins(OP_END, R_X1, R_X1, R_X1);
    endcase
  endfunction

  localparam reg_e R_QX = R_T4;   // result x
  localparam reg_e R_QY = R_T5;   // result y

endpackage

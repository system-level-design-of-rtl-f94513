// ecc_pkg -- types and constants shared by the elliptic-curve engine: the
// register-file map, the field-operation micro-instruction and the micro-code
// of the two affine point routines (doubling and addition) on
// y^2 + xy = x^3 + a x^2 + b over GF(2^m).
//
// Register map (field elements, M bits each): the six curve/point parameters
// a, b, xP, yP, x2P, y2P (read only during a computation), the fifteen
// temporaries m0..m14 and the accumulated point (xt, yt). The scalar k and the
// reduction polynomial f are held outside the map. The names of the registers
// follow the engine's block diagram; the micro-code is this design's.
package ecc_pkg;

  typedef enum logic [4:0] {
    R_A   = 5'd0,  R_B   = 5'd1,  R_XP  = 5'd2,  R_YP  = 5'd3,
    R_X2P = 5'd4,  R_Y2P = 5'd5,
    R_M0  = 5'd6,  R_M1  = 5'd7,  R_M2  = 5'd8,  R_M3  = 5'd9,
    R_M4  = 5'd10, R_M5  = 5'd11, R_M6  = 5'd12, R_M7  = 5'd13,
    R_M8  = 5'd14, R_M9  = 5'd15, R_M10 = 5'd16, R_M11 = 5'd17,
    R_M12 = 5'd18, R_M13 = 5'd19, R_M14 = 5'd20,
    R_XT  = 5'd21, R_YT  = 5'd22
  } reg_e;

  localparam int unsigned NPARAM = 6;   // a, b, xP, yP, x2P, y2P
  localparam int unsigned NTEMP  = 17;  // m0..m14, xt, yt

  typedef enum logic [2:0] {
    OP_ADD,   // dst = sa + sb   (XOR)
    OP_ADD1,  // dst = sa + 1
    OP_MOV,   // dst = sa
    OP_MUL,   // dst = sa * sb mod f
    OP_DIV    // dst = sa / sb mod f
  } op_e;

  typedef struct packed {
    op_e  op;
    reg_e dst;
    reg_e sa;
    reg_e sb;
    logic last;   // final instruction of a routine
  } uinstr_t;

  // entry points of the two routines in the micro-code store
  localparam logic [4:0] PC_DBL = 5'd0;
  localparam logic [4:0] PC_ADD = 5'd10;

  // Doubling (xt, yt) <- 2(xt, yt), xt != 0:
  //   lam = xt + yt/xt ; x3 = lam^2 + lam + a ; y3 = xt^2 + (lam + 1) x3
  // Addition (xt, yt) <- (xt, yt) + (m13, m14), xt != m13:
  //   lam = (yt + m14)/(xt + m13) ; x3 = lam^2 + lam + xt + m13 + a
  //   y3 = lam (xt + x3) + x3 + yt
  function automatic uinstr_t ucode(input logic [4:0] pc);
    case (pc)
      // doubling
      5'd0:  return '{OP_DIV,  R_M0, R_YT, R_XT, 1'b0};
      5'd1:  return '{OP_ADD,  R_M1, R_XT, R_M0, 1'b0};  // lam
      5'd2:  return '{OP_MUL,  R_M2, R_M1, R_M1, 1'b0};
      5'd3:  return '{OP_ADD,  R_M2, R_M2, R_M1, 1'b0};
      5'd4:  return '{OP_ADD,  R_M3, R_M2, R_A,  1'b0};  // x3
      5'd5:  return '{OP_MUL,  R_M4, R_XT, R_XT, 1'b0};
      5'd6:  return '{OP_ADD1, R_M5, R_M1, R_M1, 1'b0};
      5'd7:  return '{OP_MUL,  R_M6, R_M5, R_M3, 1'b0};
      5'd8:  return '{OP_ADD,  R_YT, R_M4, R_M6, 1'b0};  // y3
      5'd9:  return '{OP_MOV,  R_XT, R_M3, R_M3, 1'b1};
      // addition
      5'd10: return '{OP_ADD,  R_M0, R_YT, R_M14, 1'b0};
      5'd11: return '{OP_ADD,  R_M1, R_XT, R_M13, 1'b0};
      5'd12: return '{OP_DIV,  R_M2, R_M0, R_M1, 1'b0};  // lam
      5'd13: return '{OP_MUL,  R_M3, R_M2, R_M2, 1'b0};
      5'd14: return '{OP_ADD,  R_M3, R_M3, R_M2, 1'b0};
      5'd15: return '{OP_ADD,  R_M3, R_M3, R_M1, 1'b0};
      5'd16: return '{OP_ADD,  R_M3, R_M3, R_A,  1'b0};  // x3
      5'd17: return '{OP_ADD,  R_M4, R_XT, R_M3, 1'b0};
      5'd18: return '{OP_MUL,  R_M5, R_M2, R_M4, 1'b0};
      5'd19: return '{OP_ADD,  R_M5, R_M5, R_M3, 1'b0};
      5'd20: return '{OP_ADD,  R_YT, R_M5, R_YT, 1'b0};  // y3
      5'd21: return '{OP_MOV,  R_XT, R_M3, R_M3, 1'b1};
      default: return '{OP_MOV, R_M0, R_M0, R_M0, 1'b1};
    endcase
  endfunction

endpackage

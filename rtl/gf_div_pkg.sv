// gf_div_pkg -- control encoding of the GF(2^m) divider.
//
// One divider cycle performs two Euclid iterations at once. Which compound
// operation each register takes is decided by five bits: the two top bits of R
// (R[m], R[m-1]), the two top bits of S (S[m], S[m-1]) and whether the
// counter delta is zero. The 19 cases, and the operation each selects for R, S,
// U, V and delta, are those of the divider's control table in the source
// design; ctl_rom() below is that table. Subtraction is XOR; products by x act
// on R and S as plain shifts and on U and V modulo the field polynomial;
// /x and /x^2 act on U modulo the field polynomial.
package gf_div_pkg;

  typedef enum logic [2:0] {
    R_X2R,    // x^2 R
    R_XR,     // x R
    R_KEEP,   // R
    R_X2S,    // x^2 S
    R_XS,     // x S
    R_X2SR,   // x^2 (S - R)
    R_XSR     // x (S - R)
  } r_sel_e;

  typedef enum logic [2:0] {
    S_KEEP,   // S
    S_XS,     // x S
    S_XSXR,   // x (S - xR)
    S_R,      // R
    S_X2S,    // x^2 S
    S_XXSR,   // x (xS - R)
    S_X2SR,   // x^2 (S - R)
    S_XRXSR   // x (R - x(S - R))
  } s_sel_e;

  typedef enum logic [2:0] {
    U_X2U,    // x^2 U
    U_KEEP,   // U
    U_X2V,    // x^2 V
    U_D2U,    // U / x^2
    U_V,      // V
    U_X2VU,   // x^2 (V - U)
    U_VU      // V - U
  } u_sel_e;

  typedef enum logic [2:0] {
    V_KEEP,   // V
    V_VXU,    // V - xU
    V_U,      // U
    V_UXV,    // U - xV
    V_VDU,    // V - U/x
    V_VU,     // V - U
    V_UXVU,   // U - x(V - U)
    V_VUDU    // V - U - U/x
  } v_sel_e;

  typedef enum logic [2:0] {
    D_INC2,   // delta + 2
    D_KEEP,   // delta
    D_SET2,   // 2
    D_DEC2,   // delta - 2
    D_ZERO    // 0
  } d_sel_e;

  typedef struct packed {
    r_sel_e r;
    s_sel_e s;
    u_sel_e u;
    v_sel_e v;
    d_sel_e d;
  } div_ctl_t;

  // rr = {R[m], R[m-1]}, ss = {S[m], S[m-1]}, dz = (delta == 0)
  function automatic div_ctl_t ctl_rom(input logic [1:0] rr, input logic [1:0] ss, input logic dz);
    unique casez ({rr, ss, dz})
      5'b00_??_?: return '{R_X2R,  S_KEEP,  U_X2U,  V_KEEP, D_INC2};  //  1
      5'b01_0?_?: return '{R_XR,   S_XS,    U_KEEP, V_KEEP, D_KEEP};  //  2
      5'b01_1?_?: return '{R_XR,   S_XSXR,  U_KEEP, V_VXU,  D_KEEP};  //  3
      5'b10_00_1: return '{R_X2S,  S_R,     U_X2V,  V_U,    D_SET2};  //  4
      5'b10_00_0: return '{R_KEEP, S_X2S,   U_D2U,  V_KEEP, D_DEC2};  //  5
      5'b10_01_1: return '{R_XS,   S_XXSR,  U_V,    V_UXV,  D_ZERO};  //  6
      5'b10_01_0: return '{R_KEEP, S_XXSR,  U_D2U,  V_VDU,  D_DEC2};  //  7
      5'b10_10_1: return '{R_X2SR, S_R,     U_X2VU, V_U,    D_SET2};  //  8
      5'b10_10_0: return '{R_KEEP, S_X2SR,  U_D2U,  V_VU,   D_DEC2};  //  9
      5'b10_11_1: return '{R_XSR,  S_XRXSR, U_VU,   V_UXVU, D_ZERO};  // 10
      5'b10_11_0: return '{R_KEEP, S_XRXSR, U_D2U,  V_VUDU, D_DEC2};  // 11
      5'b11_00_1: return '{R_X2S,  S_R,     U_X2V,  V_U,    D_SET2};  // 12
      5'b11_00_0: return '{R_KEEP, S_X2S,   U_D2U,  V_KEEP, D_DEC2};  // 13
      5'b11_01_1: return '{R_XS,   S_XXSR,  U_V,    V_UXV,  D_ZERO};  // 14
      5'b11_01_0: return '{R_KEEP, S_XXSR,  U_D2U,  V_VDU,  D_DEC2};  // 15
      5'b11_10_1: return '{R_XSR,  S_XRXSR, U_VU,   V_UXVU, D_ZERO};  // 16
      5'b11_10_0: return '{R_KEEP, S_XRXSR, U_D2U,  V_VUDU, D_DEC2};  // 17
      5'b11_11_1: return '{R_X2SR, S_R,     U_X2VU, V_U,    D_SET2};  // 18
      default:    return '{R_KEEP, S_X2SR,  U_D2U,  V_VU,   D_DEC2};  // 19: 11_11_0
    endcase
  endfunction

endpackage

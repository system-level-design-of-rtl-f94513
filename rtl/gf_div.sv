// gf_div -- GF(2^M) divider, Q = A/B mod P, by a binary Euclid algorithm that
// retires two iterations per control step.
//
// State: R and S (M+1 bits), U and V (M bits) and an up/down counter delta of
// log2(M+1) bits. Start: R = B, S = P, U = A, V = 0, delta = 0. A single
// iteration of the underlying algorithm is
//   R[M] = 0 : R = xR, U = xU mod P, delta = delta + 1
//   R[M] = 1 : if S[M] = 1 then S = S - R, V = V - U;  S = xS;
//              if delta = 0 then swap (R,S) and (U,V), U = xU mod P, delta = 1
//              else U = U/x mod P, delta = delta - 1
// and keeps B*U = c*A*R and B*V = c*A*S (mod P) for a common factor c; after
// exactly 2M iterations U = A/B. The hardware never performs single
// iterations: each control step applies two at once, chosen by the control
// table (gf_div_pkg::ctl_rom, 19 cases) from R[M], R[M-1], S[M], S[M-1] and
// delta = 0. Delta only takes even values between steps, so the table's two
// cases for delta (zero or not) are enough.
//
// STEPS control steps are chained per clock. The default, one step (two
// iterations) per clock, gives the result after M cycles (193); STEPS = 2 gives
// ceil(M/2) cycles (97 for M = 193), the last cycle then doing the one step
// still due. The control table, the R/S/U/V register set, the counter and the
// M-cycle operation follow the source article; writing the cell array as
// word-wide multiplexers and the STEPS option are this design's.
//
// Interface: pulse start with a, b (b != 0) and p (the full reduction
// polynomial, M+1 bits, p[0] = 1) valid; they are registered. busy is high for
// ceil(M/STEPS) cycles; done pulses exactly ceil(M/STEPS) clock edges after the
// edge that sampled start, and q (= U) holds A/B from then until the next start.
module gf_div
  import gf_div_pkg::*;
#(
  parameter int unsigned M     = 193,
  parameter int unsigned STEPS = 1      // control steps (two iterations each) per clock
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M:0]   p,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] q
);
  localparam int unsigned DW = $clog2(M + 1);   // log2(m+1)-bit up/down counter
  localparam int unsigned IW = $clog2(M + 1);   // control steps still to do

  typedef struct packed {
    logic [M:0]    r;
    logic [M:0]    s;
    logic [M-1:0]  u;
    logic [M-1:0]  v;
    logic [DW-1:0] delta;
  } div_state_t;

  div_state_t    st_q, st_n;
  logic [M:0]    p_q;
  logic [IW-1:0] left_q;

  function automatic logic [M-1:0] mulx(input logic [M-1:0] x, input logic [M:0] pp);
    logic [M:0] t;
    t = {x, 1'b0};
    if (t[M]) t ^= pp;
    return t[M-1:0];
  endfunction

  function automatic logic [M-1:0] divx(input logic [M-1:0] x, input logic [M:0] pp);
    logic [M:0] t;
    t = {1'b0, x};
    if (t[0]) t ^= pp;
    return t[M:1];
  endfunction

  // shift of an R/S word (no reduction: the table only shifts out zeros)
  function automatic logic [M:0] sh(input logic [M:0] x);
    return x << 1;
  endfunction

  // one control step: look up the table, then every register takes its operand
  function automatic div_state_t cstep(input div_state_t in, input logic [M:0] pp);
    div_state_t   o;
    div_ctl_t     c;
    logic [M:0]   sr;
    logic [M-1:0] vu;
    c  = ctl_rom(in.r[M -: 2], in.s[M -: 2], in.delta == '0);
    sr = in.s ^ in.r;
    vu = in.v ^ in.u;
    unique case (c.r)
      R_X2R:   o.r = sh(sh(in.r));
      R_XR:    o.r = sh(in.r);
      R_X2S:   o.r = sh(sh(in.s));
      R_XS:    o.r = sh(in.s);
      R_X2SR:  o.r = sh(sh(sr));
      R_XSR:   o.r = sh(sr);
      default: o.r = in.r;
    endcase
    unique case (c.s)
      S_XS:    o.s = sh(in.s);
      S_XSXR:  o.s = sh(in.s ^ sh(in.r));
      S_R:     o.s = in.r;
      S_X2S:   o.s = sh(sh(in.s));
      S_XXSR:  o.s = sh(sh(in.s) ^ in.r);
      S_X2SR:  o.s = sh(sh(sr));
      S_XRXSR: o.s = sh(in.r ^ sh(sr));
      default: o.s = in.s;
    endcase
    unique case (c.u)
      U_X2U:   o.u = mulx(mulx(in.u, pp), pp);
      U_X2V:   o.u = mulx(mulx(in.v, pp), pp);
      U_D2U:   o.u = divx(divx(in.u, pp), pp);
      U_V:     o.u = in.v;
      U_X2VU:  o.u = mulx(mulx(vu, pp), pp);
      U_VU:    o.u = vu;
      default: o.u = in.u;
    endcase
    unique case (c.v)
      V_VXU:   o.v = in.v ^ mulx(in.u, pp);
      V_U:     o.v = in.u;
      V_UXV:   o.v = in.u ^ mulx(in.v, pp);
      V_VDU:   o.v = in.v ^ divx(in.u, pp);
      V_VU:    o.v = vu;
      V_UXVU:  o.v = in.u ^ mulx(vu, pp);
      V_VUDU:  o.v = vu ^ divx(in.u, pp);
      default: o.v = in.v;
    endcase
    unique case (c.d)
      D_INC2:  o.delta = in.delta + DW'(2);
      D_SET2:  o.delta = DW'(2);
      D_DEC2:  o.delta = in.delta - DW'(2);
      D_ZERO:  o.delta = '0;
      default: o.delta = in.delta;
    endcase
    return o;
  endfunction

  // STEPS control steps in cascade; in the last cycle only those still due
  always_comb begin
    st_n = st_q;
    for (int i = 0; i < STEPS; i++)
      if (IW'(i) < left_q) st_n = cstep(st_n, p_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      p_q    <= '0;
      left_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else if (start) begin
      st_q.r     <= {1'b0, b};
      st_q.s     <= p;
      st_q.u     <= a;
      st_q.v     <= '0;
      st_q.delta <= '0;
      p_q        <= p;
      left_q     <= IW'(M);
      busy       <= 1'b1;
      done       <= 1'b0;
    end else if (busy) begin
      st_q   <= st_n;
      left_q <= (left_q > IW'(STEPS)) ? left_q - IW'(STEPS) : '0;
      busy   <= (left_q > IW'(STEPS));
      done   <= (left_q <= IW'(STEPS));
    end else begin
      done   <= 1'b0;
    end
  end

  // between control steps delta is even: the table has no case for an odd one
  a_even: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !st_q.delta[0])
    else $error("gf_div: odd delta at a control step");

  assign q = st_q.u;
endmodule

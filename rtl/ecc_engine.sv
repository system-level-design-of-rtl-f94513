// ecc_engine -- elliptic-curve scalar multiplication engine, Q = k*P over
// GF(2^M) (M = 193, f(x) = x^193 + x^15 + 1 in the reference configuration).
//
// Loading: the eight parameter registers k, f, a, b, xP, yP, x2P, y2P (M+1 bits
// each, 8*(M+1) = 1552 bits for M = 193) form one shift chain. Each cycle with
// encrypt high shifts serial_in in; bits are sent most significant first,
// k first and y2P last. When the last bit has arrived the computation starts by
// itself. ready_ecc falls with the first loaded bit and rises when Q is ready;
// encrypted_point = {xt, yt} then holds the result until the next load. The
// point at infinity is returned as {0, 0}.
//
// Computation: k is recoded into radix-4 signed digits d in {0, +-1, +-2}
// (Booth-style, d_i = -2k[2i+1] + k[2i] + k[2i-1]), ceil((M+1)/2) = 97 digits
// for M = 193, so the top digit loads Q and 96 steps of Q = 4Q + d_i*P follow.
// +-P and +-2P are taken from the preloaded (xP, yP) and (x2P, y2P); a negative
// digit uses -(x, y) = (x, x + y). Points are kept in affine coordinates; each
// point routine is a short sequence of field micro-operations (see ecc_pkg) run
// on one shared three-bits-per-cycle multiplier (ceil(M/3) cycles), one shared
// two-iterations-per-cycle divider (M cycles) and a single-cycle XOR adder.
// Special cases handled by the controller: Q at infinity, doubling a point with
// x = 0, and adding +-Q to Q.
//
// The register set, the radix-4 recoding, the preloaded 2P, the adder,
// multiplier and divider follow the source article; the micro-code, the controller's
// states, the point-at-infinity handling and the load protocol are this
// design's. The time per job is data dependent: every zero digit skips an
// addition. k must be below 2^M (k[M] = 0). Reset is asynchronous, active low.
module ecc_engine
  import ecc_pkg::*;
#(
  parameter int unsigned M = 193
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           serial_in,
  input  logic           encrypt,
  output logic [2*M-1:0] encrypted_point,
  output logic           ready_ecc
);
  localparam int unsigned PW    = M + 1;               // parameter register width
  localparam int unsigned LOADW = 8 * PW;              // serial chain length
  localparam int unsigned NDIG  = (M + 2) / 2;         // radix-4 digits of k
  localparam int unsigned KXW   = 2 * NDIG + 1;
  localparam int unsigned LCW   = $clog2(LOADW + 1);
  localparam int unsigned DCW   = $clog2(NDIG);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_DBL_A, S_DBL_B, S_DIGIT, S_ADDCHK, S_EXEC, S_NEXT, S_DONE
  } state_e;

  state_e          state_q, ret_q;
  logic [LOADW-1:0] par_q;                 // {k, f, a, b, xP, yP, x2P, y2P}
  logic [M-1:0]    tmp_q [NTEMP];          // m0..m14, xt, yt
  logic [LCW-1:0]  lcnt_q;
  logic [DCW-1:0]  idx_q;
  logic            qinf_q;
  logic [4:0]      pc_q;
  logic            issued_q;

  // parameter fields
  logic [PW-1:0] k_w, f_w;
  logic [M-1:0]  prm [NPARAM];
  assign k_w = par_q[7*PW +: PW];
  assign f_w = par_q[6*PW +: PW];
  always_comb
    for (int i = 0; i < NPARAM; i++) prm[i] = par_q[(5-i)*PW +: M];

  logic [M-1:0] xp_w, yp_w, x2p_w, y2p_w;
  assign xp_w  = prm[2];
  assign yp_w  = prm[3];
  assign x2p_w = prm[4];
  assign y2p_w = prm[5];

  function automatic logic [M-1:0] rd(input reg_e r);
    if (r < R_M0) return prm[3'(r)];
    return tmp_q[r - R_M0];
  endfunction

  // radix-4 digit of k at idx_q
  logic [KXW-1:0] kx;
  logic [2:0]     trip;
  logic           d_neg, d_two, d_zero;
  assign kx     = KXW'({k_w, 1'b0});
  assign trip   = kx[2*idx_q +: 3];
  assign d_zero = (trip == 3'b000) || (trip == 3'b111);
  assign d_two  = (trip == 3'b011) || (trip == 3'b100);
  assign d_neg  = trip[2];

  // field units
  uinstr_t      ui;
  logic [M-1:0] opa, opb;
  logic         mul_start, mul_busy, mul_done, div_start, div_busy, div_done;
  logic [M-1:0] mul_z, div_q;
  assign ui  = ucode(pc_q);
  assign opa = rd(ui.sa);
  assign opb = rd(ui.sb);
  assign mul_start = (state_q == S_EXEC) && (ui.op == OP_MUL) && !issued_q;
  assign div_start = (state_q == S_EXEC) && (ui.op == OP_DIV) && !issued_q;

  gf_mul3x #(.M(M)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(opa), .b(opb), .p(f_w[M-1:0]),
    .busy(mul_busy), .done(mul_done), .z(mul_z)
  );

  gf_div #(.M(M)) u_div (
    .clk, .rst_n, .start(div_start), .a(opa), .b(opb), .p(f_w),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  // a field unit is only started when idle
  a_mul_idle: assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy)
    else $error("ecc_engine: multiplier started while busy");
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy)
    else $error("ecc_engine: divider started while busy");

  // result of the current micro-instruction and whether it completes now
  logic [M-1:0] res;
  logic         res_valid;
  always_comb begin
    res = '0; res_valid = 1'b0;
    unique case (ui.op)
      OP_ADD:  begin res = opa ^ opb;         res_valid = 1'b1; end
      OP_ADD1: begin res = opa ^ M'(1);       res_valid = 1'b1; end
      OP_MOV:  begin res = opa;               res_valid = 1'b1; end
      OP_MUL:  begin res = mul_z;             res_valid = issued_q && mul_done; end
      OP_DIV:  begin res = div_q;             res_valid = issued_q && div_done; end
      default: ;
    endcase
  end

  logic [M-1:0] xt, yt, xd, yd;
  assign xt = tmp_q[R_XT - R_M0];
  assign yt = tmp_q[R_YT - R_M0];
  assign xd = tmp_q[R_M13 - R_M0];
  assign yd = tmp_q[R_M14 - R_M0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      ret_q    <= S_IDLE;
      par_q    <= '0;
      for (int i = 0; i < NTEMP; i++) tmp_q[i] <= '0;
      lcnt_q   <= '0;
      idx_q    <= '0;
      qinf_q   <= 1'b1;
      pc_q     <= '0;
      issued_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE, S_LOAD: begin
          if (encrypt) begin
            par_q  <= {par_q[LOADW-2:0], serial_in};
            lcnt_q <= lcnt_q + 1'b1;
            state_q <= S_LOAD;
            if (lcnt_q == LCW'(LOADW - 1)) begin
              lcnt_q  <= '0;
              idx_q   <= DCW'(NDIG - 1);
              qinf_q  <= 1'b1;
              state_q <= S_DBL_A;
            end
          end
        end
        S_DBL_A: begin
          if (idx_q == DCW'(NDIG - 1) || qinf_q) state_q <= S_DIGIT;
          else if (xt == '0) begin qinf_q <= 1'b1; state_q <= S_DIGIT; end
          else begin pc_q <= PC_DBL; ret_q <= S_DBL_B; state_q <= S_EXEC; end
        end
        S_DBL_B: begin
          if (xt == '0) begin qinf_q <= 1'b1; state_q <= S_DIGIT; end
          else begin pc_q <= PC_DBL; ret_q <= S_DIGIT; state_q <= S_EXEC; end
        end
        S_DIGIT: begin
          if (d_zero) state_q <= S_NEXT;
          else begin
            // operand +-P or +-2P into (m13, m14)
            tmp_q[R_M13 - R_M0] <= d_two ? x2p_w : xp_w;
            tmp_q[R_M14 - R_M0] <= d_two ? (d_neg ? x2p_w ^ y2p_w : y2p_w)
                                         : (d_neg ? xp_w  ^ yp_w  : yp_w);
            state_q <= S_ADDCHK;
          end
        end
        S_ADDCHK: begin
          if (qinf_q) begin
            tmp_q[R_XT - R_M0] <= xd;
            tmp_q[R_YT - R_M0] <= yd;
            qinf_q  <= 1'b0;
            state_q <= S_NEXT;
          end else if (xt == xd) begin
            if (yt == yd && xt != '0) begin pc_q <= PC_DBL; ret_q <= S_NEXT; state_q <= S_EXEC; end
            else begin qinf_q <= 1'b1; state_q <= S_NEXT; end
          end else begin
            pc_q <= PC_ADD; ret_q <= S_NEXT; state_q <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (!issued_q && (ui.op == OP_MUL || ui.op == OP_DIV)) issued_q <= 1'b1;
          if (res_valid) begin
            tmp_q[ui.dst - R_M0] <= res;
            issued_q <= 1'b0;
            if (ui.last) state_q <= ret_q;
            else pc_q <= pc_q + 1'b1;
          end
        end
        S_NEXT: begin
          if (idx_q == '0) state_q <= S_DONE;
          else begin idx_q <= idx_q - 1'b1; state_q <= S_DBL_A; end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign ready_ecc       = (state_q == S_DONE);
  assign encrypted_point = qinf_q ? '0 : {xt, yt};
endmodule

// gf_mul3x -- digit-serial GF(2^M) multiplier that consumes three bits of B per cycle.
//
// Z = A*B mod P is split by the index of the B bit modulo 3:
//   Z0 = sum b[3k]   * x^(3k) A
//   Z1 = sum b[3k+1] * x^(3k) A
//   Z2 = sum b[3k+2] * x^(3k) A
//   Z  = Z0 + x*Z1 + x^2*Z2  (mod P)
// Each cycle the running operand x^(3k)A is added into the three accumulators
// under control of the next three B bits and is then advanced by x^3 through
// the gf_x3_mul cell array. After ceil(M/3) cycles (65 for M = 193) the three
// accumulators hold Z0..Z2 and the post-multiplication by x and x^2 is done
// combinationally at the output. The split into three partial sums and the
// x^3 stepping follow the source article; the start/done handshake, the B shift
// register and the combinational post-multiplication are this design's.
//
// Interface: pulse start for one cycle with a, b and p (the M low coefficients
// of the reduction polynomial, p[M-1] = p[M-2] = 0 required) valid; a, b and p
// are registered at start. busy is high for the ceil(M/3) accumulation cycles;
// done pulses for one cycle exactly ceil(M/3) clock edges after the edge that
// sampled start, and z holds the product from then until the next start.
module gf_mul3x #(
  parameter int unsigned M = 193
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] z
);
  localparam int unsigned NCYC = (M + 2) / 3;
  localparam int unsigned BW   = 3 * NCYC;          // B padded to a multiple of 3
  localparam int unsigned CW   = $clog2(NCYC + 1);

  logic [M-1:0]  a_q, p_q, z0_q, z1_q, z2_q;
  logic [BW-1:0] b_q;
  logic [CW-1:0] cnt_q;
  logic [M-1:0]  a_x3;
  logic [M-1:0]  z0_n, z1_n, z2_n;
  logic [M-1:0]  x_z1, x2_z2;

  gf_x3_mul #(.M(M)) u_x3 (.a(a_q), .p(p_q), .c(a_x3));

  always_comb begin
    z0_n = z0_q ^ (b_q[0] ? a_q : '0);
    z1_n = z1_q ^ (b_q[1] ? a_q : '0);
    z2_n = z2_q ^ (b_q[2] ? a_q : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; p_q <= '0; b_q <= '0;
      z0_q <= '0; z1_q <= '0; z2_q <= '0;
      cnt_q <= '0; busy <= 1'b0; done <= 1'b0;
    end else if (start) begin
      done  <= 1'b0;
      a_q   <= a;
      p_q   <= p;
      b_q   <= BW'(b);
      z0_q  <= '0; z1_q <= '0; z2_q <= '0;
      cnt_q <= CW'(NCYC);
      busy  <= 1'b1;
    end else if (busy) begin
      z0_q  <= z0_n; z1_q <= z1_n; z2_q <= z2_n;
      a_q   <= a_x3;
      b_q   <= b_q >> 3;
      cnt_q <= cnt_q - 1'b1;
      busy  <= (cnt_q != 1);
      done  <= (cnt_q == 1);
    end else begin
      done  <= 1'b0;
    end
  end


  // post-multiplication: x*Z1 and x^2*Z2, reduced (p[M-1] = p[M-2] = 0 keeps
  // each fold to a single XOR with a shifted copy of p)
  always_comb begin
    x_z1 = {z1_q[M-2:0], 1'b0};
    if (z1_q[M-1]) x_z1 ^= p_q;
    x2_z2 = {z2_q[M-3:0], 2'b00};
    if (z2_q[M-2]) x2_z2 ^= p_q;
    if (z2_q[M-1]) x2_z2 ^= {p_q[M-2:0], 1'b0};
  end

  assign z = z0_q ^ x_z1 ^ x2_z2;
endmodule

// tb_gf_div -- checks the GF(2^193) divider: Q = A/B must satisfy Q*B = A under
// the reference multiplier and equal A * B^(2^m-2) from the Fermat reference;
// done must arrive exactly M = 193 clock edges after start with one control
// step (two Euclid iterations) per cycle, and 97 edges after start in a second
// instance that does two steps per cycle. Every cycle, the table-driven state
// update is compared with two single iterations of the Euclid rule computed
// here, and each of the 18 reachable control cases must be used at least once.
module tb_gf_div;
  import gf_ref_pkg::*;
  localparam int M = 193;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a, b, q, q4;
  logic busy4, done4;
  logic [M:0] p;
  fe_t pf, exp_q;

  gf_div #(.M(M), .STEPS(1)) dut (.*);

  // single iteration of the Euclid rule, on {r, s, u, v, delta}
  typedef struct packed { logic [M:0] r, s; logic [M-1:0] u, v; int d; } ref_st_t;
  function automatic logic [M-1:0] rmx(logic [M-1:0] x);
    return x[M-1] ? ({x[M-2:0], 1'b0} ^ p[M-1:0]) : {x[M-2:0], 1'b0};
  endfunction
  function automatic logic [M-1:0] rdx(logic [M-1:0] x);
    logic [M:0] t = x[0] ? ({1'b0, x} ^ p) : {1'b0, x};
    return t[M:1];
  endfunction
  function automatic ref_st_t iter(ref_st_t i);
    ref_st_t o = i;
    if (!i.r[M]) begin o.r = i.r << 1; o.u = rmx(i.u); o.d = i.d + 1; end
    else begin
      logic [M:0] s2 = i.s; logic [M-1:0] v2 = i.v;
      if (i.s[M]) begin s2 = i.s ^ i.r; v2 = i.v ^ i.u; end
      s2 = s2 << 1;
      if (i.d == 0) begin o.r = s2; o.s = i.r; o.u = rmx(v2); o.v = i.u; o.d = 1; end
      else begin o.s = s2; o.v = v2; o.u = rdx(i.u); o.d = i.d - 1; end
    end
    return o;
  endfunction
  // which of the 19 control cases a state selects (numbering of the table)
  function automatic int row_of(logic [1:0] rr, logic [1:0] ss, bit dz);
    if (rr == 2'b00) return 1;
    if (rr == 2'b01) return ss[1] ? 3 : 2;
    return (rr == 2'b10 ? 4 : 12) + 2 * int'(ss) + (dz ? 0 : 1);
  endfunction
  ref_st_t exp_st;
  bit      exp_ok = 0;
  bit      row_seen [1:19];
  int      n_step_checks = 0, n_step_fail = 0;
  always @(posedge clk) begin
    if (exp_ok) begin
      n_step_checks++;
      if (dut.st_q.r !== exp_st.r || dut.st_q.s !== exp_st.s || dut.st_q.u !== exp_st.u ||
          dut.st_q.v !== exp_st.v || int'(dut.st_q.delta) != exp_st.d) n_step_fail++;
    end
    exp_ok = 0;
    if (rst_n && dut.busy && !start) begin
      ref_st_t c;
      c.r = dut.st_q.r; c.s = dut.st_q.s; c.u = dut.st_q.u; c.v = dut.st_q.v; c.d = int'(dut.st_q.delta);
      row_seen[row_of(c.r[M -: 2], c.s[M -: 2], c.d == 0)] = 1;
      exp_st = iter(iter(c));
      exp_ok = 1;
    end
    #1;
  end
  gf_div #(.M(M), .STEPS(2)) dut4 (.clk, .rst_n, .start, .a, .b, .p, .busy(busy4), .done(done4), .q(q4));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, lat4;
    fe_t av, bv;
    pf = (fe_t'(1) << M) | (fe_t'(1) << 15) | fe_t'(1);
    p  = pf[M:0];
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      av = (t == 0) ? fe_t'(1) : rand_fe(M);
      bv = (t == 0) ? fe_t'(1) : (t == 1) ? fe_t'(1) << (M - 1) : (t == 2) ? (fe_t'(1) << M) - 1 : rand_fe(M);
      if (bv == '0) bv = fe_t'(3);
      @(negedge clk);
      a = av[M-1:0]; b = bv[M-1:0]; start = 1;
      @(negedge clk);
      start = 0; a = '0; b = '0;
      lat = 0;  // edges after the one that sampled start
      lat4 = -1;
      while (!done) begin
        if (done4 && lat4 < 0) lat4 = lat;
        @(negedge clk); lat++;
      end
      checks++;
      if (lat4 != (M + 1) / 2 || q4 !== q) begin
        failures++;
        $display("four-per-cycle: latency %0d, expected %0d, q %s", lat4, (M + 1) / 2,
                 (q4 === q) ? "same" : "differs");
      end
      exp_q = gdiv(av, bv, pf, M);
      checks++;
      if (q !== exp_q[M-1:0]) begin
        failures++;
        if (failures < 5) $display("mismatch a=%h b=%h q=%h exp=%h", av[M-1:0], bv[M-1:0], q, exp_q[M-1:0]);
      end
      checks++;
      if (gmul(fe_t'(q), bv, pf, M) != av) failures++;
      checks++;
      if (lat != M) begin
        failures++;
        $display("latency %0d, expected %0d", lat, M);
      end
    end
    checks += n_step_checks;
    failures += n_step_fail;
    // case 2 (R = 01, S = 0x) cannot occur from a legal start: while R[M] is 0,
    // S still has degree M, so S[M] = 1
    for (int r = 1; r <= 19; r++) begin
      if (r == 2) continue;
      checks++;
      if (!row_seen[r]) begin failures++; $display("control case %0d never used", r); end
    end
    $display("per-cycle state checks %0d, failing %0d", n_step_checks, n_step_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ecc_farm -- one farm of four engines, run at a reduced field size
// (GF(2^31), f = x^31 + x^3 + 1) so that many jobs fit in a short simulation.
// Jobs mix long scalars with tiny ones so that later jobs finish first; every
// result must come out in job order and equal the reference k*P. Counts and
// requires: a completion out of job order, all engines busy at once, the input
// buffer refusing a job, and the output being held back by the consumer.
module tb_ecc_farm #(
  parameter int M  = 31,
  parameter int FT = 3,
  parameter int NJ = 14
);
  import gf_ref_pkg::*;
  localparam int PW = M + 1, JW = 8 * PW, RW = 2 * M;
  int checks = 0, failures = 0;
  int n_ooo = 0, n_allbusy = 0, n_refused = 0, n_held = 0, n_out = 0;
  logic clk = 0, rst_n = 0, job_valid = 0, job_ready, res_valid, res_ready = 0;
  logic [JW-1:0] job_data = '0;
  logic [RW-1:0] res_data;
  logic [3:0]    eng_busy;
  fe_t pf, ca, cb, ks [NJ];
  pt_t pp, p2;
  logic [RW-1:0] expv [NJ];

  ecc_farm #(.M(M), .N_ENG(4), .IB_DEPTH(4), .CB_SLOTS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.cmp_valid && dut.cmp_token != dut.u_rob.drn_q) n_ooo++;
    if (&eng_busy) n_allbusy++;
    if (job_valid && !job_ready) n_refused++;
    if (res_valid && !res_ready) n_held++;
  end

  // consumer: random ready, checks order and value
  always @(negedge clk) res_ready <= ($urandom_range(0, 99) < 30);
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    checks++;
    if (n_out >= NJ || res_data !== expv[n_out]) begin
      failures++; $display("result %0d: %h expected %h", n_out, res_data, expv[n_out]);
    end
    n_out++;
  end

  function automatic logic [JW-1:0] pack(input fe_t k);
    return {k[PW-1:0], pf[PW-1:0], ca[PW-1:0], cb[PW-1:0], pp.x[PW-1:0], pp.y[PW-1:0],
            p2.x[PW-1:0], p2.y[PW-1:0]};
  endfunction

  initial begin
    pt_t q;
    pf = (fe_t'(1) << M) | (fe_t'(1) << FT) | fe_t'(1);
    ca = rand_fe(M);
    pp.inf = 0; pp.x = rand_fe(M); pp.y = rand_fe(M);
    cb = curve_b(pp.x, pp.y, ca, pf, M);
    p2 = pdbl(pp, ca, pf, M);
    for (int j = 0; j < NJ; j++) begin
      ks[j] = (j % 3 == 1) ? fe_t'(j) : rand_fe(M);
      q = pmul(ks[j], pp, ca, pf, M);
      expv[j] = q.inf ? '0 : {q.x[M-1:0], q.y[M-1:0]};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      job_valid = 1; job_data = pack(ks[j]);
      @(posedge clk);
      while (!job_ready) @(posedge clk);
    end
    @(negedge clk);
    job_valid = 0;
    while (n_out < NJ) @(posedge clk);
    checks++;
    if (n_ooo == 0 || n_allbusy == 0 || n_refused == 0 || n_held == 0) begin
      failures++;
    end
    $display("out-of-order completions %0d, all-busy cycles %0d, refused %0d, output held %0d",
             n_ooo, n_allbusy, n_refused, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

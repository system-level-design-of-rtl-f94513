// tb_ecc_server_farms -- end-to-end test of the two-farm system at a reduced
// field size (GF(2^31), f = x^31 + x^3 + 1). A job source plays the part of
// the random-number generator: random curves, points and scalars (with some
// tiny scalars mixed in so that jobs overtake each other). Every compared
// result must match between the farms, equal the reference k*P, and come out
// in job order. Counts and requires each mechanism at least once: a job held
// back because a farm's input buffer is full, all engines of a farm busy, an
// out-of-order completion reordered in each farm, a drain that waits for an
// older job, the point at infinity, and the consumer stalling the output.
module tb_ecc_server_farms #(
  parameter int M  = 31,
  parameter int FT = 3,
  parameter int NJ = 16
);
  import gf_ref_pkg::*;
  localparam int PW = M + 1, JW = 8 * PW, RW = 2 * M;
  int checks = 0, failures = 0, n_out = 0;
  int n_refused = 0, n_allbusy = 0, n_ooo1 = 0, n_ooo2 = 0, n_wait = 0, n_inf = 0, n_held = 0;
  logic clk = 0, rst_n = 0, job_valid = 0, job_ready;
  logic result_valid, result_ready = 0, result_match;
  logic [JW-1:0] job_data = '0;
  logic [RW-1:0] result_data;
  logic [31:0] n_results, n_mismatch;
  logic [3:0] farm1_busy, farm2_busy;
  logic [JW-1:0] jobs [NJ];
  logic [RW-1:0] expv [NJ];

  ecc_server_farms #(.M(M), .N_ENG(4), .IB_DEPTH(4), .CB_SLOTS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (job_valid && !job_ready) n_refused++;
    if (&farm1_busy) n_allbusy++;
    if (dut.u_farm1.cmp_valid && dut.u_farm1.cmp_token != dut.u_farm1.u_rob.drn_q) n_ooo1++;
    if (dut.u_farm2.cmp_valid && dut.u_farm2.cmp_token != dut.u_farm2.u_rob.drn_q) n_ooo2++;
    if (!dut.u_farm1.res_valid && (dut.u_farm1.u_rob.done_q != '0)) n_wait++;
    if (result_valid && !result_ready) n_held++;
  end

  always @(negedge clk) result_ready <= ($urandom_range(0, 99) < 40);
  always @(posedge clk) if (rst_n && result_valid && result_ready) begin
    checks++;
    if (!result_match) begin failures++; $display("farms disagree on result %0d", n_out); end
    checks++;
    if (n_out >= NJ || result_data !== expv[n_out]) begin
      failures++; $display("result %0d: %h expected %h", n_out, result_data, expv[n_out]);
    end
    if (result_data == '0) n_inf++;
    n_out++;
  end

  initial begin
    fe_t pf, ca, cb, k;
    pt_t pp, p2, q;
    pf = (fe_t'(1) << M) | (fe_t'(1) << FT) | fe_t'(1);
    for (int j = 0; j < NJ; j++) begin
      ca = rand_fe(M);
      pp.inf = 0; pp.x = rand_fe(M); pp.y = rand_fe(M);
      if (pp.x == '0) pp.x = fe_t'(5);
      cb = curve_b(pp.x, pp.y, ca, pf, M);
      p2 = pdbl(pp, ca, pf, M);
      k  = (j == 5) ? fe_t'(0) : (j % 4 == 2) ? fe_t'(j) : rand_fe(M);
      q  = pmul(k, pp, ca, pf, M);
      expv[j] = q.inf ? '0 : {q.x[M-1:0], q.y[M-1:0]};
      jobs[j] = {k[PW-1:0], pf[PW-1:0], ca[PW-1:0], cb[PW-1:0], pp.x[PW-1:0], pp.y[PW-1:0],
                 p2.x[PW-1:0], p2.y[PW-1:0]};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      job_valid = 1; job_data = jobs[j];
      @(posedge clk);
      while (!job_ready) @(posedge clk);
    end
    @(negedge clk);
    job_valid = 0;
    while (n_out < NJ) @(posedge clk);
    @(negedge clk);
    checks++;
    if (n_results != 32'(NJ) || n_mismatch != 0) begin
      failures++; $display("compare counters %0d/%0d", n_results, n_mismatch);
    end
    $display("input buffer full %0d, all engines busy %0d, out-of-order farm1 %0d farm2 %0d",
             n_refused, n_allbusy, n_ooo1, n_ooo2);
    $display("drain waiting on older job %0d, infinity results %0d, output held %0d",
             n_wait, n_inf, n_held);
    checks++;
    if (n_refused == 0 || n_allbusy == 0 || n_ooo1 == 0 || n_ooo2 == 0 || n_wait == 0 ||
        n_inf == 0 || n_held == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

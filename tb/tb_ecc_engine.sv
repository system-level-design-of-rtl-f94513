// tb_ecc_engine -- loads the engine serially and checks k*P against the
// reference double-and-add (binary, no recoding) on a random curve over
// GF(2^M), M = 193, f = x^193 + x^15 + 1 by default. The curve coefficient b is
// derived so that the random point lies on the curve; 2P comes from the
// reference. Small scalars exercise the point at infinity, the 2P digits and
// negative digits; random scalars exercise the general path. Also checks that
// ready_ecc drops while busy and that exactly ceil((M+1)/2) digits are
// processed (the top digit and (M+1)/2 - 1 = 96 steps for M = 193).
module tb_ecc_engine #(
  parameter int M  = 193,
  parameter int FT = 15     // middle term of the trinomial x^M + x^FT + 1
);
  import gf_ref_pkg::*;
  localparam int PW = M + 1;
  localparam int NDIG = (M + 2) / 2;
  int checks = 0, failures = 0;
  int n_neg = 0, n_two = 0, n_zero = 0;
  logic clk = 0, rst_n = 0, serial_in = 0, encrypt = 0, ready_ecc;
  logic [2*M-1:0] encrypted_point;
  fe_t pf, ca, cb;
  pt_t pp, p2, qexp;

  ecc_engine #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digit statistics, from the digit the engine decodes
  always @(posedge clk)
    if (dut.state_q == dut.S_DIGIT) begin
      if (dut.d_zero) n_zero++;
      else begin
        if (dut.d_neg) n_neg++;
        if (dut.d_two) n_two++;
      end
    end

  task automatic send_field(input fe_t v);
    for (int i = PW - 1; i >= 0; i--) begin
      @(negedge clk);
      serial_in = v[i]; encrypt = 1;
    end
  endtask

  task automatic run_job(input fe_t k);
    int steps, cyc;
    send_field(k);  send_field(pf); send_field(ca); send_field(cb);
    send_field(pp.x); send_field(pp.y); send_field(p2.x); send_field(p2.y);
    @(negedge clk);
    encrypt = 0; serial_in = 0;
    checks++;
    if (ready_ecc) begin failures++; $display("ready_ecc high while computing"); end
    steps = 0; cyc = 0;
    while (!ready_ecc) begin
      @(negedge clk);
      cyc++;
      if (dut.state_q == dut.S_NEXT) steps++;
    end
    qexp = pmul(k, pp, ca, pf, M);
    checks++;
    if (qexp.inf ? (encrypted_point != '0)
                 : (encrypted_point != {qexp.x[M-1:0], qexp.y[M-1:0]})) begin
      failures++;
      $display("k=%h: got %h expected inf=%0d %h %h", k[M-1:0], encrypted_point, qexp.inf,
               qexp.x[M-1:0], qexp.y[M-1:0]);
    end
    checks++;
    if (steps != NDIG) begin failures++; $display("digits processed %0d, expected %0d", steps, NDIG); end
    $display("k=%h done in %0d cycles", k[M-1:0], cyc);
  endtask

  initial begin
    fe_t k;
    pf = (fe_t'(1) << M) | (fe_t'(1) << FT) | fe_t'(1);
    ca = rand_fe(M);
    pp.inf = 0;
    pp.x = rand_fe(M);
    pp.y = rand_fe(M);
    cb = curve_b(pp.x, pp.y, ca, pf, M);
    p2 = pdbl(pp, ca, pf, M);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(fe_t'(1));
    run_job(fe_t'(2));
    run_job(fe_t'(3));
    run_job(fe_t'(6));
    run_job(fe_t'(0));
    for (int t = 0; t < 3; t++) begin
      k = rand_fe(M);
      run_job(k);
    end
    checks++;
    if (n_neg == 0 || n_two == 0 || n_zero == 0) begin
      failures++;
      $display("digit kinds not all seen: neg=%0d two=%0d zero=%0d", n_neg, n_two, n_zero);
    end
    $display("digits: negative %0d, magnitude two %0d, zero %0d", n_neg, n_two, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

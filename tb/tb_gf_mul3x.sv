// tb_gf_mul3x -- checks the three-bits-per-cycle GF(2^193) multiplier against
// the bit-serial reference, and that done arrives exactly ceil(193/3) = 65 clock
// edges after start. Also runs back-to-back operations.
module tb_gf_mul3x;
  import gf_ref_pkg::*;
  localparam int M = 193;
  localparam int NCYC = (M + 2) / 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a, b, p, z;
  fe_t pf, exp_z;

  gf_mul3x #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    fe_t av, bv;
    pf = (fe_t'(1) << M) | (fe_t'(1) << 15) | fe_t'(1);
    p  = pf[M-1:0];
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      av = (t == 0) ? fe_t'(1) : (t == 1) ? (fe_t'(1) << M) - 1 : rand_fe(M);
      bv = (t == 0) ? (fe_t'(1) << M) - 1 : (t == 1) ? (fe_t'(1) << M) - 1 : rand_fe(M);
      @(negedge clk);
      a = av[M-1:0]; b = bv[M-1:0]; start = 1;
      @(negedge clk);
      start = 0; a = '0; b = '0;
      lat = 0;  // edges after the one that sampled start
      while (!done) begin @(negedge clk); lat++; end
      exp_z = gmul(av, bv, pf, M);
      checks++;
      if (z !== exp_z[M-1:0]) begin
        failures++;
        if (failures < 5) $display("mismatch a=%h b=%h z=%h exp=%h", av[M-1:0], bv[M-1:0], z, exp_z[M-1:0]);
      end
      checks++;
      if (lat != NCYC) begin
        failures++;
        $display("latency %0d, expected %0d", lat, NCYC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf_x3_mul -- checks x^3*A mod P of gf_x3_mul against the reference
// multiplier (A times the constant x^3) for GF(2^193), P = x^193 + x^15 + 1,
// on edge-case and random operands.
module tb_gf_x3_mul;
  import gf_ref_pkg::*;
  localparam int M = 193;
  int checks = 0, failures = 0;
  logic [M-1:0] a, p, c;
  fe_t pf, exp_c;

  gf_x3_mul #(.M(M)) dut (.a(a), .p(p), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pf = (fe_t'(1) << M) | (fe_t'(1) << 15) | fe_t'(1);
    p  = pf[M-1:0];
    for (int t = 0; t < 400; t++) begin
      fe_t av;
      if (t < 3) av = fe_t'(1) << (M - 1 - t);       // each overflow bit alone
      else if (t == 3) av = (fe_t'(1) << M) - 1;
      else av = rand_fe(M);
      a = av[M-1:0];
      #1;
      exp_c = gmul(av, fe_t'(8), pf, M);
      checks++;
      if (c !== exp_c[M-1:0]) begin
        failures++;
        if (failures < 5) $display("mismatch a=%h c=%h exp=%h", a, c, exp_c[M-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

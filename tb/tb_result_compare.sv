// tb_result_compare -- feeds two result streams that agree except at chosen
// positions, with random valid/ready gaps, and checks that pairs are taken only
// when both sides and the output are ready, the match flag of every pair, and
// the pair and mismatch counters.
module tb_result_compare;
  localparam int W = 24;
  int checks = 0, failures = 0, na = 0, nb = 0, nout = 0, exp_mis = 0;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, b_valid = 0, out_ready = 0, a_ready, b_ready, out_valid, out_match;
  logic [W-1:0] a_data = '0, b_data = '0, out_data;
  logic [31:0] n_compared, n_mismatch;

  result_compare #(.WIDTH(W), .CW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] sa(int i); return W'(i * 977 + 3); endfunction
  function automatic logic [W-1:0] sb(int i); return (i % 7 == 3) ? sa(i) ^ W'(1 << (i % W)) : sa(i); endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      a_valid = ($urandom_range(0, 99) < 60); a_data = sa(na);
      b_valid = ($urandom_range(0, 99) < 60); b_data = sb(nb);
      out_ready = ($urandom_range(0, 99) < 70);
      #1;
      checks++;
      if ((a_ready !== (a_valid && b_valid && out_ready)) || (b_ready !== a_ready)) begin
        failures++; $display("handshake wrong at %0d", c);
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== sa(nout) || out_match !== (sa(nout) == sb(nout))) begin
          failures++; $display("pair %0d wrong", nout);
        end
        if (sa(nout) != sb(nout)) exp_mis++;
        nout++;
      end
      @(posedge clk);
      if (a_valid && a_ready) na++;
      if (b_valid && b_ready) nb++;
    end
    @(negedge clk);
    checks++;
    if (n_compared != 32'(nout) || n_mismatch != 32'(exp_mis) || exp_mis == 0) begin
      failures++; $display("counters %0d/%0d expected %0d/%0d", n_compared, n_mismatch, nout, exp_mis);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_job_fifo -- random push/pop traffic against a queue model: checks the
// order and value of every word popped, that in_ready is low exactly when the
// model holds DEPTH words, that out_valid is high exactly when it holds any,
// and that simultaneous push and pop work when full and when non-empty.
module tb_job_fifo;
  localparam int W = 16, D = 4;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0, in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [W-1:0] model [$];

  job_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // bias the traffic towards filling in the first half, draining in the second
      in_valid  = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 75 : 35));
      out_ready = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 35 : 75));
      in_data   = W'($urandom);
      #1;
      checks++;
      if (in_ready !== (model.size() < D)) begin failures++; $display("in_ready wrong at %0d", c); end
      checks++;
      if (out_valid !== (model.size() > 0)) begin failures++; $display("out_valid wrong at %0d", c); end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("data %h expected %h", out_data, model[0]); end
      end
      if (model.size() == D) n_full++;
      if (in_valid && in_ready && out_valid && out_ready) n_both++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("full %0d, push+pop %0d", n_full, n_both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

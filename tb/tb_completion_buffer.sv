// tb_completion_buffer -- reserves slots, completes them in a random order with
// data derived from the reservation number, and checks that drain returns the
// data strictly in reservation order, that reserve is refused when all N slots
// are held, and that drain waits for a slow older slot while younger ones are
// already complete.
module tb_completion_buffer;
  localparam int N = 8, W = 32, TW = $clog2(N);
  int checks = 0, failures = 0, n_refused = 0, n_waited = 0;
  logic clk = 0, rst_n = 0;
  logic reserve_valid = 0, reserve_ready, complete_valid = 0, drain_ready = 0, drain_valid;
  logic [TW-1:0] reserve_token, complete_token = '0;
  logic [W-1:0] complete_data = '0, drain_data;
  int pend_tok [$];     // reserved, not completed: token
  int pend_seq [$];     // ... and reservation number
  int next_seq = 0, next_drain = 0;
  bit done_seq [int];

  completion_buffer #(.N(N), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] val(int s);
    return W'(s * 32'h9E3779B1 + 7);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int pick;
      @(negedge clk);
      reserve_valid = ($urandom_range(0, 99) < 50);
      drain_ready   = ($urandom_range(0, 99) < 60);
      complete_valid = 0;
      if (pend_tok.size() > 0 && $urandom_range(0, 99) < 45) begin
        // prefer younger slots so older ones lag behind
        pick = $urandom_range(0, pend_tok.size() - 1);
        complete_valid = 1;
        complete_token = TW'(pend_tok[pick]);
        complete_data  = val(pend_seq[pick]);
        done_seq[pend_seq[pick]] = 1;
        pend_tok.delete(pick);
        pend_seq.delete(pick);
      end
      #1;
      checks++;
      if (reserve_ready !== ((next_seq - next_drain) < N)) begin failures++; $display("reserve_ready wrong"); end
      if (reserve_valid && !reserve_ready) n_refused++;
      if (!drain_valid && (next_seq - next_drain) > 0) begin
        foreach (done_seq[s]) if (s > next_drain) begin n_waited++; break; end
      end
      if (drain_valid && drain_ready) begin
        checks++;
        if (drain_data !== val(next_drain)) begin
          failures++; $display("drain %h expected %h (seq %0d)", drain_data, val(next_drain), next_drain);
        end
      end
      @(posedge clk);
      if (drain_valid && drain_ready) begin done_seq.delete(next_drain); next_drain++; end
      if (reserve_valid && reserve_ready) begin
        pend_tok.push_back(int'(reserve_token));
        pend_seq.push_back(next_seq);
        next_seq++;
      end
    end
    checks++;
    if (n_refused == 0 || n_waited == 0 || next_drain < 100) begin
      failures++; $display("refused %0d waited %0d drained %0d", n_refused, n_waited, next_drain);
    end
    $display("drained %0d, reserve refused %0d, drain waited on older slot %0d", next_drain, n_refused, n_waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

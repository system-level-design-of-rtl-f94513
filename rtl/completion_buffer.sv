// completion_buffer -- reorder buffer that returns out-of-order results in the
// order their slots were reserved.
//
// Three operations, as in the source article's completion-buffer interface:
//   reserve  handshake (reserve_valid/reserve_ready): allocates the next slot
//            in order and returns its token; refused when all N slots are taken.
//   complete (complete_valid, complete_token, complete_data): stores a result
//            in the slot named by the token, in any order.
//   drain    handshake (drain_valid/drain_ready): delivers the result of the
//            oldest reserved slot once it has been completed, then frees it.
// Slots form a circular array with a reserve pointer, a drain pointer and an
// occupancy count; each slot has a "done" flag. A completion made in one cycle
// can be drained in the next. The slot count N, the handshakes and the
// one-cycle timing are this design's choices. Reset is asynchronous, active
// low, and frees every slot.
module completion_buffer #(
  parameter int unsigned N     = 8,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned TW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // reserve
  input  logic             reserve_valid,
  output logic             reserve_ready,
  output logic [TW-1:0]    reserve_token,
  // complete
  input  logic             complete_valid,
  input  logic [TW-1:0]    complete_token,
  input  logic [WIDTH-1:0] complete_data,
  // drain
  output logic             drain_valid,
  input  logic             drain_ready,
  output logic [WIDTH-1:0] drain_data
);
  logic [WIDTH-1:0] data_q [N];
  logic [N-1:0]     done_q;
  logic [TW-1:0]    res_q, drn_q;
  logic [TW:0]      cnt_q;
  logic             do_res, do_drn;

  function automatic logic [TW-1:0] nxt(input logic [TW-1:0] ptr);
    return (ptr == TW'(N - 1)) ? '0 : ptr + 1'b1;
  endfunction

  assign reserve_ready = (cnt_q != (TW+1)'(N));
  assign reserve_token = res_q;
  assign drain_valid   = (cnt_q != '0) && done_q[drn_q];
  assign drain_data    = data_q[drn_q];
  assign do_res        = reserve_valid && reserve_ready;
  assign do_drn        = drain_valid && drain_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q  <= '0;
      drn_q  <= '0;
      cnt_q  <= '0;
      done_q <= '0;
    end else begin
      if (do_res) res_q <= nxt(res_q);
      if (do_drn) begin
        drn_q <= nxt(drn_q);
        done_q[drn_q] <= 1'b0;
      end
      if (complete_valid) done_q[complete_token] <= 1'b1;
      cnt_q <= cnt_q + (TW+1)'(do_res) - (TW+1)'(do_drn);
    end
  end

  always_ff @(posedge clk)
    if (complete_valid) data_q[complete_token] <= complete_data;

  // a completion must name a reserved slot that has not completed yet
  a_once: assert property (@(posedge clk) disable iff (!rst_n)
                           complete_valid |-> !done_q[complete_token])
    else $error("completion_buffer: slot completed twice");
endmodule

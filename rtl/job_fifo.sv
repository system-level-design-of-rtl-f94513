// job_fifo -- synchronous first-in first-out buffer with valid/ready handshakes
// on both sides; the input buffer of a server farm.
//
// DEPTH entries of WIDTH bits in a circular array with read and write pointers
// and an occupancy count. in_ready is low when full; out_valid is high when not
// empty and out_data shows the oldest entry. A transfer happens on a clock edge
// where valid and ready are both high; a push and a pop may happen in the same
// cycle. No bypass: a word can be popped one cycle after it was pushed. The
// source article names an input buffer in each farm; its depth and handshake are this
// design's choice. Reset is asynchronous, active low, and empties the buffer.
module job_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW-1:0]    wr_q, rd_q;
  logic [AW:0]      cnt_q;
  logic             push, pop;

  assign in_ready  = (cnt_q != (AW+1)'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem_q[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] ptr);
    return (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= nxt(wr_q);
      if (pop)  rd_q <= nxt(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem_q[wr_q] <= in_data;

  // a full buffer never accepts and an empty one never delivers
  a_count: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (AW+1)'(DEPTH))
    else $error("job_fifo: count overflow");
endmodule

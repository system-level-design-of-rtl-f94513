// ecc_farm -- a server farm of N_ENG elliptic-curve engines behind one input
// buffer and one reorder buffer.
//
// A job is the full parameter set of one scalar multiplication,
// {k, f, a, b, xP, yP, x2P, y2P}, 8*(M+1) bits. Jobs enter through the input
// buffer (job_fifo). The dispatcher takes the oldest job when an engine is idle
// and the reorder buffer has a free slot: it reserves a slot, remembers the
// token for that engine, and shifts the job into the engine over its serial
// port, one bit per cycle, most significant bit first (8*(M+1) = 1552 cycles for
// M = 193); one engine is loaded at a time, the lowest-numbered idle one. Engines
// finish in a data-dependent order; a finished engine's point is written into
// the reorder buffer under its token (lowest-numbered engine first when several
// finish together), which frees the engine. The reorder buffer releases results
// on the output in job order.
//
// The farm of four engines, the input buffer, the reorder buffer and in-order
// delivery follow the source article; the lowest-index allocation, the shared serial
// loader and the buffer sizes are this design's choices. Both handshakes are
// valid/ready. Reset is asynchronous, active low.
module ecc_farm #(
  parameter int unsigned M        = 193,
  parameter int unsigned N_ENG    = 4,
  parameter int unsigned IB_DEPTH = 4,
  parameter int unsigned CB_SLOTS = 8,
  localparam int unsigned JW      = 8 * (M + 1),
  localparam int unsigned RW      = 2 * M
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             job_valid,
  output logic             job_ready,
  input  logic [JW-1:0]    job_data,
  output logic             res_valid,
  input  logic             res_ready,
  output logic [RW-1:0]    res_data,
  output logic [N_ENG-1:0] eng_busy
);
  localparam int unsigned TW = (CB_SLOTS > 1) ? $clog2(CB_SLOTS) : 1;
  localparam int unsigned EW = (N_ENG > 1) ? $clog2(N_ENG) : 1;
  localparam int unsigned BW = $clog2(JW + 1);

  // input buffer
  logic          ib_valid, ib_ready;
  logic [JW-1:0] ib_data;
  job_fifo #(.WIDTH(JW), .DEPTH(IB_DEPTH)) u_ib (
    .clk, .rst_n,
    .in_valid(job_valid), .in_ready(job_ready), .in_data(job_data),
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data)
  );

  // reorder buffer
  logic          rsv_valid, rsv_ready, cmp_valid;
  logic [TW-1:0] rsv_token, cmp_token;
  logic [RW-1:0] cmp_data;
  completion_buffer #(.N(CB_SLOTS), .WIDTH(RW)) u_rob (
    .clk, .rst_n,
    .reserve_valid(rsv_valid), .reserve_ready(rsv_ready), .reserve_token(rsv_token),
    .complete_valid(cmp_valid), .complete_token(cmp_token), .complete_data(cmp_data),
    .drain_valid(res_valid), .drain_ready(res_ready), .drain_data(res_data)
  );

  // engines
  logic [N_ENG-1:0] enc, ser, rdy;
  logic [RW-1:0]    pt [N_ENG];
  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    ecc_engine #(.M(M)) u_ecc (
      .clk, .rst_n,
      .serial_in(ser[e]), .encrypt(enc[e]),
      .encrypted_point(pt[e]), .ready_ecc(rdy[e])
    );
  end

  // dispatcher
  logic             sending_q;
  logic [EW-1:0]    tgt_q;
  logic [JW-1:0]    sh_q;
  logic [BW-1:0]    bits_q;
  logic [N_ENG-1:0] busy_q, loaded_q;
  logic [TW-1:0]    tok_q [N_ENG];
  logic             free_any, dispatch;
  logic [EW-1:0]    free_idx;

  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int e = N_ENG - 1; e >= 0; e--)
      if (!busy_q[e]) begin free_any = 1'b1; free_idx = EW'(e); end
  end

  assign dispatch  = !sending_q && ib_valid && rsv_ready && free_any;
  assign ib_ready  = dispatch;
  assign rsv_valid = dispatch;

  always_comb
    for (int e = 0; e < N_ENG; e++) begin
      enc[e] = sending_q && (tgt_q == EW'(e));
      ser[e] = enc[e] && sh_q[JW-1];
    end

  // completion: lowest-numbered finished engine
  logic [EW-1:0] fin_idx;
  always_comb begin
    cmp_valid = 1'b0;
    fin_idx   = '0;
    for (int e = N_ENG - 1; e >= 0; e--)
      if (busy_q[e] && loaded_q[e] && rdy[e]) begin cmp_valid = 1'b1; fin_idx = EW'(e); end
  end
  assign cmp_token = tok_q[fin_idx];
  assign cmp_data  = pt[fin_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending_q <= 1'b0;
      tgt_q     <= '0;
      sh_q      <= '0;
      bits_q    <= '0;
      busy_q    <= '0;
      loaded_q  <= '0;
      for (int e = 0; e < N_ENG; e++) tok_q[e] <= '0;
    end else begin
      if (dispatch) begin
        sending_q        <= 1'b1;
        tgt_q            <= free_idx;
        sh_q             <= ib_data;
        bits_q           <= BW'(JW);
        busy_q[free_idx] <= 1'b1;
        tok_q[free_idx]  <= rsv_token;
      end else if (sending_q) begin
        sh_q   <= {sh_q[JW-2:0], 1'b0};
        bits_q <= bits_q - 1'b1;
        if (bits_q == BW'(1)) begin
          sending_q       <= 1'b0;
          loaded_q[tgt_q] <= 1'b1;
        end
      end
      if (cmp_valid) begin
        busy_q[fin_idx]   <= 1'b0;
        loaded_q[fin_idx] <= 1'b0;
      end
    end
  end

  assign eng_busy = busy_q;
endmodule

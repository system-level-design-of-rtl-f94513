// ecc_server_farms -- two identical elliptic-curve server farms run side by
// side on the same job stream, with their in-order results compared.
//
// Every job offered on job_* is accepted only when both farms' input buffers
// can take it, so both farms see the same jobs in the same order. Each farm
// (ecc_farm) spreads its jobs over N_ENG = 4 engines and returns results in job
// order through its reorder buffer; result_compare takes one result from each
// farm, passes farm 1's on result_data and flags whether farm 2's agreed. The
// job source (a random-number generator built around a block cipher in the
// source article's set-up) is outside this module: jobs come in through job_*.
//
// Job format: {k, f, a, b, xP, yP, x2P, y2P}, each M+1 bits, k most significant.
// Result: {xt, yt} = k*P, 2*M bits; the point at infinity is all zeros.
// The two farms of four engines follow the source article; the handshakes are
// valid/ready and are this design's. Reset asynchronous, active low.
module ecc_server_farms #(
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
  output logic             result_valid,
  input  logic             result_ready,
  output logic [RW-1:0]    result_data,
  output logic             result_match,
  output logic [31:0]      n_results,
  output logic [31:0]      n_mismatch,
  output logic [N_ENG-1:0] farm1_busy,
  output logic [N_ENG-1:0] farm2_busy
);
  logic          r1, r2, v1, v2, a_rdy, b_rdy;
  logic [RW-1:0] d1, d2;

  assign job_ready = r1 && r2;

  ecc_farm #(.M(M), .N_ENG(N_ENG), .IB_DEPTH(IB_DEPTH), .CB_SLOTS(CB_SLOTS)) u_farm1 (
    .clk, .rst_n,
    .job_valid(job_valid && job_ready), .job_ready(r1), .job_data,
    .res_valid(v1), .res_ready(a_rdy), .res_data(d1), .eng_busy(farm1_busy)
  );

  ecc_farm #(.M(M), .N_ENG(N_ENG), .IB_DEPTH(IB_DEPTH), .CB_SLOTS(CB_SLOTS)) u_farm2 (
    .clk, .rst_n,
    .job_valid(job_valid && job_ready), .job_ready(r2), .job_data,
    .res_valid(v2), .res_ready(b_rdy), .res_data(d2), .eng_busy(farm2_busy)
  );

  result_compare #(.WIDTH(RW), .CW(32)) u_cmp (
    .clk, .rst_n,
    .a_valid(v1), .a_ready(a_rdy), .a_data(d1),
    .b_valid(v2), .b_ready(b_rdy), .b_data(d2),
    .out_valid(result_valid), .out_ready(result_ready), .out_data(result_data),
    .out_match(result_match), .n_compared(n_results), .n_mismatch(n_mismatch)
  );
endmodule

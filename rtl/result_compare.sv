// result_compare -- pairs the in-order result streams of the two server farms
// and checks that they agree.
//
// Both farms are given the same jobs, so the n-th result of one must equal the
// n-th result of the other. When both inputs are valid and the output is
// accepted (out_ready), one result is taken from each side in the same cycle;
// out_data carries farm A's result and out_match says whether farm B's was the
// same. n_compared and n_mismatch count the pairs and the disagreements since
// reset. The compare stage is drawn in the source article; the handshake and the
// counters are this design's. Combinational from inputs to out_valid/out_match;
// counters update on the clock edge of the transfer. Reset asynchronous, active
// low.
module result_compare #(
  parameter int unsigned WIDTH = 386,
  parameter int unsigned CW    = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_valid,
  output logic             a_ready,
  input  logic [WIDTH-1:0] a_data,
  input  logic             b_valid,
  output logic             b_ready,
  input  logic [WIDTH-1:0] b_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_match,
  output logic [CW-1:0]    n_compared,
  output logic [CW-1:0]    n_mismatch
);
  logic take;

  assign out_valid = a_valid && b_valid;
  assign out_data  = a_data;
  assign out_match = (a_data == b_data);
  assign take      = out_valid && out_ready;
  assign a_ready   = take;
  assign b_ready   = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_compared <= '0;
      n_mismatch <= '0;
    end else if (take) begin
      n_compared <= n_compared + 1'b1;
      if (!out_match) n_mismatch <= n_mismatch + 1'b1;
    end
  end
endmodule

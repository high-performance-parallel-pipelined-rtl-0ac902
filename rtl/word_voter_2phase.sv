// word_voter_2phase: two-phase pipelined word voter.
//
// Same function and ports as word_voter_3phase, but Phases 1 and 2 are one
// network: the Batcher sorting network of wv_sort_network with every
// comparator a voter2_cell, which sorts unequal words and combines equal
// ones. Phase 3 (wv_max_selector) then picks a pair with the largest vote.
// Outputs: the voted word y, its total vote w (W = B + ceil(lg N) bits) and
// quorum = (w >= thresh), thresh a static setting. One vote per clock; the
// result appears LATENCY = t(t+1)/2 + ceil(lg N) cycles later (t = ceil(lg
// N)), 9 cycles for N = 5. The pipelining, widths, quorum compare and reset
// (synchronous, active low, valid bits only) are this design's choices.
module word_voter_2phase
  import voting_pkg::*;
#(
  parameter int N = 5,
  parameter int K = 16,
  parameter int B = 4,
  parameter bit PIPELINED = 1'b1,
  localparam int W = B + $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][K-1:0] x,
  input  logic [N-1:0][B-1:0] v,
  input  logic [W-1:0]        thresh,
  output logic                out_valid,
  output logic [K-1:0]        y,
  output logic [W-1:0]        w,
  output logic                quorum
);

  logic [N-1:0][W-1:0] vw;
  logic                c_valid;
  logic [N-1:0][K-1:0] c_x;
  logic [N-1:0][W-1:0] c_v;

  // widen each vote to the width of a full sum
  always_comb
    for (int i = 0; i < N; i++) vw[i] = W'(v[i]);

  wv_sort_network #(.N(N), .K(K), .W(W), .VOTER_CELLS(1'b1), .PIPELINED(PIPELINED)) u_net (
    .clk, .rst_n, .in_valid, .x_in(x), .v_in(vw),
    .out_valid(c_valid), .x_out(c_x), .v_out(c_v));

  wv_max_selector #(.N(N), .K(K), .W(W), .PIPELINED(PIPELINED)) u_max (
    .clk, .rst_n, .in_valid(c_valid), .x_in(c_x), .v_in(c_v),
    .out_valid(out_valid), .x_out(y), .v_out(w));

  assign quorum = w >= thresh;
endmodule

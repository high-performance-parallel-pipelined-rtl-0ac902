// word_voter_3phase: three-phase pipelined word voter.
//
// N inputs, each a K-bit data word x[i] with a B-bit vote v[i], arrive in
// parallel. Phase 1 (wv_sort_network with 2-sorter cells) sorts the pairs
// by data word; Phase 2 (wv_combiner) sums the votes of each run of equal
// words onto the first line of the run; Phase 3 (wv_max_selector) picks a
// pair with the largest vote. Outputs: the voted word y, its total vote w
// (W = B + ceil(lg N) bits, enough for the sum of all votes) and quorum,
// which is w >= thresh. When two values tie for the largest vote either may
// appear. One vote per clock is accepted; the result appears LATENCY =
// t(t+1)/2 + 2 ceil(lg N) cycles later (t = ceil(lg N)), 12 cycles for N = 5.
// thresh is taken as a static setting and compared at the output. The
// pipelining, the widths, the quorum compare and the reset (synchronous,
// active low, valid bits only) are this design's choices.
module word_voter_3phase
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
  logic                s_valid, c_valid;
  logic [N-1:0][K-1:0] s_x, c_x;
  logic [N-1:0][W-1:0] s_v, c_v;

  // widen each vote to the width of a full sum
  always_comb
    for (int i = 0; i < N; i++) vw[i] = W'(v[i]);

  wv_sort_network #(.N(N), .K(K), .W(W), .VOTER_CELLS(1'b0), .PIPELINED(PIPELINED)) u_sort (
    .clk, .rst_n, .in_valid, .x_in(x), .v_in(vw),
    .out_valid(s_valid), .x_out(s_x), .v_out(s_v));

  wv_combiner #(.N(N), .K(K), .W(W), .PIPELINED(PIPELINED)) u_comb (
    .clk, .rst_n, .in_valid(s_valid), .x_in(s_x), .v_in(s_v),
    .out_valid(c_valid), .x_out(c_x), .v_out(c_v));

  wv_max_selector #(.N(N), .K(K), .W(W), .PIPELINED(PIPELINED)) u_max (
    .clk, .rst_n, .in_valid(c_valid), .x_in(c_x), .v_in(c_v),
    .out_valid(out_valid), .x_out(y), .v_out(w));

  assign quorum = w >= thresh;
endmodule

// voting_networks_top: the bit-level and word-level voting networks side by
// side.
//
// Bit level, unweighted m-out-of-n (BN inputs, threshold BM):
//   gate_y - two-level logic voter (gate_bit_voter)
//   sel_y  - selection-network voter (sel_bit_voter)
// Bit level, weighted (6 inputs, votes 2,2,2,1,1,1, threshold 5; input 0
// carries the first vote of 2):
//   arith_y - AND gates plus carry-save addition (arith_bit_voter)
//   mux_y   - multiplexer decomposition (mux_bit_voter)
// Bit level, variable votes (6 inputs, 2-bit votes and a threshold given
// as inputs with the bits):
//   avar_y  - AND gates plus carry-save addition (arith_var_bit_voter)
// Word level (WN inputs of WK-bit data with WB-bit votes, shared inputs):
//   *_3p - three-phase sort / combine / select voter (word_voter_3phase)
//   *_2p - two-phase 2-voter network / select voter (word_voter_2phase)
// Each realisation of one function gets the same inputs, so the outputs of
// the pairs must agree (the word voters' y may differ on a tie, w may not).
// The bit voters are combinational. The word voters are pipelined, accept
// one set per clock and report it 12 (three-phase) or 9 (two-phase) cycles
// later at the default WN = 5. Grouping the voters in one top with shared
// inputs is this design's choice.
module voting_networks_top #(
  parameter int BN = 7,
  parameter int BM = 4,
  parameter int WN = 5,
  parameter int WK = 16,
  parameter int WB = 4,
  localparam int WW = WB + $clog2(WN)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // unweighted bit voters
  input  logic [BN-1:0]         bv_x,
  output logic                  gate_y,
  output logic                  sel_y,
  // weighted bit voters
  input  logic [5:0]            wbv_x,
  output logic                  arith_y,
  output logic                  mux_y,
  // variable-vote bit voter
  input  logic [5:0]            vbv_x,
  input  logic [5:0][1:0]       vbv_v,
  input  logic [4:0]            vbv_t,
  output logic                  avar_y,
  // word voters
  input  logic                  in_valid,
  input  logic [WN-1:0][WK-1:0] x,
  input  logic [WN-1:0][WB-1:0] v,
  input  logic [WW-1:0]         thresh,
  output logic                  out_valid_3p,
  output logic [WK-1:0]         y_3p,
  output logic [WW-1:0]         w_3p,
  output logic                  quorum_3p,
  output logic                  out_valid_2p,
  output logic [WK-1:0]         y_2p,
  output logic [WW-1:0]         w_2p,
  output logic                  quorum_2p
);
  gate_bit_voter #(.N(BN), .M(BM)) u_gate (.x(bv_x), .y(gate_y));
  sel_bit_voter  #(.N(BN), .M(BM)) u_sel  (.x(bv_x), .y(sel_y));

  arith_bit_voter u_arith (.x(wbv_x), .y(arith_y));
  mux_bit_voter   u_mux   (.x(wbv_x), .y(mux_y));

  arith_var_bit_voter u_avar (.x(vbv_x), .v(vbv_v), .t(vbv_t), .y(avar_y));

  word_voter_3phase #(.N(WN), .K(WK), .B(WB)) u_wv3 (
    .clk, .rst_n, .in_valid, .x, .v, .thresh,
    .out_valid(out_valid_3p), .y(y_3p), .w(w_3p), .quorum(quorum_3p));

  word_voter_2phase #(.N(WN), .K(WK), .B(WB)) u_wv2 (
    .clk, .rst_n, .in_valid, .x, .v, .thresh,
    .out_valid(out_valid_2p), .y(y_2p), .w(w_2p), .quorum(quorum_2p));
endmodule

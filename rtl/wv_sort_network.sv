// wv_sort_network: pipelined n-line network of data-vote comparator cells.
//
// With VOTER_CELLS = 0 this is Phase 1 of the three-phase word voter: an
// n-sorter of (data, vote) pairs built from sorter2_cell, putting the data
// words in ascending order on lines 0..N-1 with each vote following its word.
// With VOTER_CELLS = 1 every comparator is a voter2_cell instead, giving the
// merged sort/combine network of the two-phase word voter: equal words that
// meet are combined, the sum staying on the lower line.
//
// The comparator schedule is Batcher's odd-even merge sort for any N
// (voting_pkg::batcher_partner), t(t+1)/2 levels with t = ceil(lg N).
// With PIPELINED = 1 each level ends in a register stage, so the network
// accepts one set of N pairs per clock and delivers it LATENCY cycles later;
// with PIPELINED = 0 it is combinational (LATENCY = 0). out_valid follows
// in_valid through the same stages; rst_n (synchronous, active low) clears
// only the valid bits. Register-per-level pipelining and the Batcher
// schedule are this design's choices.
module wv_sort_network
  import voting_pkg::*;
#(
  parameter int N = 5,
  parameter int K = 16,
  parameter int W = 7,
  parameter bit VOTER_CELLS = 1'b0,
  parameter bit PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][K-1:0] x_in,
  input  logic [N-1:0][W-1:0] v_in,
  output logic                out_valid,
  output logic [N-1:0][K-1:0] x_out,
  output logic [N-1:0][W-1:0] v_out
);
  localparam int LV = batcher_levels(N);

  // stage l holds the lines entering comparator level l
  logic [N-1:0][K-1:0] xs [LV+1];
  logic [N-1:0][W-1:0] vs [LV+1];
  logic [N-1:0][K-1:0] xn [LV];
  logic [N-1:0][W-1:0] vn [LV];
  logic [LV:0]         vld;

  assign xs[0]  = x_in;
  assign vs[0]  = v_in;
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LV; l++) begin : g_level
    for (genvar a = 0; a < N; a++) begin : g_line
      localparam int P = batcher_partner(N, l, a);
      if (P < 0) begin : g_idle
        assign xn[l][a] = xs[l][a];
        assign vn[l][a] = vs[l][a];
      end else if (P > a) begin : g_cell
        if (VOTER_CELLS) begin : g_voter
          voter2_cell #(.K(K), .W(W)) u_cell (
            .xa(xs[l][a]), .va(vs[l][a]), .xb(xs[l][P]), .vb(vs[l][P]),
            .xlo(xn[l][a]), .vlo(vn[l][a]), .xhi(xn[l][P]), .vhi(vn[l][P]));
        end else begin : g_sorter
          sorter2_cell #(.K(K), .W(W)) u_cell (
            .xa(xs[l][a]), .va(vs[l][a]), .xb(xs[l][P]), .vb(vs[l][P]),
            .xlo(xn[l][a]), .vlo(vn[l][a]), .xhi(xn[l][P]), .vhi(vn[l][P]));
        end
      end
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk) begin
        xs[l+1] <= xn[l];
        vs[l+1] <= vn[l];
        vld[l+1] <= rst_n ? vld[l] : 1'b0;
      end
    end else begin : g_wire
      assign xs[l+1]  = xn[l];
      assign vs[l+1]  = vn[l];
      assign vld[l+1] = vld[l];
    end
  end

  assign x_out     = xs[LV];
  assign v_out     = vs[LV];
  assign out_valid = vld[LV];
endmodule

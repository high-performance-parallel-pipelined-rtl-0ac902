// wv_max_selector: pipelined n-max-selector, Phase 3 of the word voters.
//
// A binary tree of selector2_cell picks, among N data-vote pairs, one with
// the largest vote: each level pairs lines 2i and 2i+1 and an odd line left
// over passes to the next level unchanged. N-1 cells in ceil(lg N) levels.
// On a tie the pair from the lower-numbered line wins. With PIPELINED = 1
// each level ends in a register stage (one set per clock, latency = number
// of levels); rst_n clears the valid bits only. The per-level registers are
// this design's choice.
module wv_max_selector
  import voting_pkg::*;
#(
  parameter int N = 5,
  parameter int K = 16,
  parameter int W = 7,
  parameter bit PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][K-1:0] x_in,
  input  logic [N-1:0][W-1:0] v_in,
  output logic                out_valid,
  output logic [K-1:0]        x_out,
  output logic [W-1:0]        v_out
);
  localparam int LV = $clog2(N);

  logic [N-1:0][K-1:0] xs [LV+1];
  logic [N-1:0][W-1:0] vs [LV+1];
  logic [N-1:0][K-1:0] xn [LV];
  logic [N-1:0][W-1:0] vn [LV];
  logic [LV:0]         vld;

  assign xs[0]  = x_in;
  assign vs[0]  = v_in;
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LV; l++) begin : g_level
    localparam int WI = tree_width(N, l);      // live lines entering
    localparam int WO = tree_width(N, l + 1);  // live lines leaving
    for (genvar i = 0; i < N; i++) begin : g_line
      if (i < WO && 2 * i + 1 < WI) begin : g_cell
        selector2_cell #(.K(K), .W(W)) u_cell (
          .xa(xs[l][2*i]), .va(vs[l][2*i]), .xb(xs[l][2*i+1]), .vb(vs[l][2*i+1]),
          .xo(xn[l][i]), .vo(vn[l][i]));
      end else if (i < WO) begin : g_pass
        assign xn[l][i] = xs[l][2*i];
        assign vn[l][i] = vs[l][2*i];
      end else begin : g_dead
        assign xn[l][i] = '0;
        assign vn[l][i] = '0;
      end
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk) begin
        xs[l+1]  <= xn[l];
        vs[l+1]  <= vn[l];
        vld[l+1] <= rst_n ? vld[l] : 1'b0;
      end
    end else begin : g_wire
      assign xs[l+1]  = xn[l];
      assign vs[l+1]  = vn[l];
      assign vld[l+1] = vld[l];
    end
  end

  assign x_out     = xs[LV][0];
  assign v_out     = vs[LV][0];
  assign out_valid = vld[LV];
endmodule

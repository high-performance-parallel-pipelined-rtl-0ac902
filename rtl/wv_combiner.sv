// wv_combiner: pipelined n-combiner, Phase 2 of the three-phase word voter.
//
// Input: N data-vote pairs with the data already in sorted order, so equal
// words sit on adjacent lines. Output: line i carries its own vote plus the
// votes of all following lines with the same data word; the first line of
// each run of equal words thus holds the run's total vote. This is a
// segmented suffix sum computed by N overlapping binary trees: level j
// (span d = 2^j, for d < N) places a combiner2_cell on every line i with
// i + d < N, adding line i+d's partial sum when the two words match. Because
// the data are sorted, equality of x[i] and x[i+d] means every line between
// them is equal too. Cells: (N-1) + (N-2) + (N-4) + ..., levels ceil(lg N).
// Data words pass through unchanged. With PIPELINED = 1 each level ends in
// a register stage (one set per clock, latency = number of levels); rst_n
// clears the valid bits only. The per-level registers are this design's
// choice.
module wv_combiner
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
  output logic [N-1:0][K-1:0] x_out,
  output logic [N-1:0][W-1:0] v_out
);
  localparam int LV = combiner_levels(N);

  logic [N-1:0][K-1:0] xs [LV+1];
  logic [N-1:0][W-1:0] vs [LV+1];
  logic [N-1:0][W-1:0] vn [LV];
  logic [LV:0]         vld;

  assign xs[0]  = x_in;
  assign vs[0]  = v_in;
  assign vld[0] = in_valid;

  for (genvar l = 0; l < LV; l++) begin : g_level
    localparam int D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_line
      if (i + D < N) begin : g_cell
        combiner2_cell #(.K(K), .W(W)) u_cell (
          .xa(xs[l][i]), .va(vs[l][i]), .xb(xs[l][i+D]), .vb(vs[l][i+D]),
          .va_out(vn[l][i]));
      end else begin : g_pass
        assign vn[l][i] = vs[l][i];
      end
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk) begin
        xs[l+1]  <= xs[l];
        vs[l+1]  <= vn[l];
        vld[l+1] <= rst_n ? vld[l] : 1'b0;
      end
    end else begin : g_wire
      assign xs[l+1]  = xs[l];
      assign vs[l+1]  = vn[l];
      assign vld[l+1] = vld[l];
    end
  end

  assign x_out     = xs[LV];
  assign v_out     = vs[LV];
  assign out_valid = vld[LV];
endmodule

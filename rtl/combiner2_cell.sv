// combiner2_cell: 2-combiner of the three-phase word voter's Phase 2.
//
// Line a (the upper line of the pair) adds the vote of line b to its own when
// both carry the same data word; otherwise it keeps its own vote. Line b and
// both data words pass on unchanged, so the cell only produces the new vote
// of line a. Combinational.
module combiner2_cell #(
  parameter int K = 16,
  parameter int W = 7
) (
  input  logic [K-1:0] xa,
  input  logic [W-1:0] va,
  input  logic [K-1:0] xb,
  input  logic [W-1:0] vb,
  output logic [W-1:0] va_out
);
  assign va_out = (xa == xb) ? va + vb : va;
endmodule

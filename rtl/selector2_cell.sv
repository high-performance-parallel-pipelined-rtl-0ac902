// selector2_cell: 2-selector of the max-selector tree (Phase 3).
//
// Passes the data-vote pair with the larger vote. On equal votes the pair on
// input a is passed; the text allows any of the tied values. Combinational.
module selector2_cell #(
  parameter int K = 16,
  parameter int W = 7
) (
  input  logic [K-1:0] xa,
  input  logic [W-1:0] va,
  input  logic [K-1:0] xb,
  input  logic [W-1:0] vb,
  output logic [K-1:0] xo,
  output logic [W-1:0] vo
);
  assign xo = (vb > va) ? xb : xa;
  assign vo = (vb > va) ? vb : va;
endmodule

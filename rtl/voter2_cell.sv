// voter2_cell: merged 2-sorter / 2-combiner cell of the two-phase word voter.
//
// When the two data words differ the cell behaves as a 2-sorter: the pair
// with the smaller data leaves on "lo", votes moving with their data. When
// they are equal it behaves as a combiner: "lo" carries the data with the sum
// of both votes and "hi" carries the same data with a vote of zero. The
// combining rule (sum on the low line, zero on the other, so that the total
// vote of each value is conserved) is this design's choice; the text only
// says the cell sorts on unequal and combines on equal data.
// Combinational; W must hold the sum of all votes of the network.
module voter2_cell #(
  parameter int K = 16,
  parameter int W = 7
) (
  input  logic [K-1:0] xa,
  input  logic [W-1:0] va,
  input  logic [K-1:0] xb,
  input  logic [W-1:0] vb,
  output logic [K-1:0] xlo,
  output logic [W-1:0] vlo,
  output logic [K-1:0] xhi,
  output logic [W-1:0] vhi
);
  always_comb begin
    if (xa == xb) begin
      xlo = xa; vlo = va + vb; xhi = xb; vhi = '0;
    end else if (xa > xb) begin
      xlo = xb; vlo = vb; xhi = xa; vhi = va;
    end else begin
      xlo = xa; vlo = va; xhi = xb; vhi = vb;
    end
  end
endmodule

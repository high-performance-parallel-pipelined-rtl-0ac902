// sorter2_cell: 2-input, 2-output comparator for data-vote pairs.
//
// The cell either passes its two pairs straight through or exchanges them so
// that the "lo" output carries the smaller data value. The vote travels with
// its data word, which is the only change the word voter needs over a plain
// 2-sorter. Purely combinational; K-bit data, W-bit votes. Ascending order
// and "no exchange on equal data" are this design's choices.
module sorter2_cell #(
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
  logic swap;
  assign swap = xa > xb;
  always_comb begin
    if (swap) begin
      xlo = xb; vlo = vb; xhi = xa; vhi = va;
    end else begin
      xlo = xa; vlo = va; xhi = xb; vhi = vb;
    end
  end
endmodule

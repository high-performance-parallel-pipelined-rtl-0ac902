// bit_sorter: N-input bit sorting network, descending order.
//
// Every comparator is a bit 2-sorter: an OR gate puts the larger bit on the
// lower-numbered line and an AND gate puts the smaller bit on the other.
// The comparators follow Batcher's odd-even merge sort for any N
// (voting_pkg::batcher_partner), t(t+1)/2 levels with t = ceil(lg N). After
// the network, y[j] = 1 iff at least j+1 input bits are 1. Combinational.
// Batcher's schedule is this design's choice of sorting network.
module bit_sorter
  import voting_pkg::*;
#(
  parameter int N = 7
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  localparam int LV = batcher_levels(N);

  logic [N-1:0] s [LV+1];
  assign s[0] = x;

  for (genvar l = 0; l < LV; l++) begin : g_level
    for (genvar a = 0; a < N; a++) begin : g_line
      localparam int P = batcher_partner(N, l, a);
      if (P < 0) begin : g_idle
        assign s[l+1][a] = s[l][a];
      end else if (P > a) begin : g_cell
        assign s[l+1][a] = s[l][a] | s[l][P];   // larger bit
        assign s[l+1][P] = s[l][a] & s[l][P];   // smaller bit
      end
    end
  end

  assign y = s[LV];
endmodule

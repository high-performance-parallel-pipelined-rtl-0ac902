// sel_bit_voter: selection-based m-out-of-n bit voter.
//
// y = 1 iff at least M of the N input bits are 1, i.e. iff the M largest
// input bits are all 1. Two forms, chosen by TYPE1:
//   TYPE1 = 1 (default): a selector that puts the M largest bits on M lines
//     in no particular order, followed by an M-input AND. The inputs are
//     split into halves of floor(N/2) and ceil(N/2) bits, each sorted in
//     descending order by a bit_sorter; output line i of the selector is
//     a[i] OR b[M-1-i] (a bit beyond a half's length counts as 0). Those M
//     ORs hold the M largest bits of the union, so their AND is the vote.
//   TYPE1 = 0: one bit_sorter over all N inputs; its line M-1 carries the
//     M-th largest bit, which is the vote. Synthesis keeps only the
//     comparators that reach that line.
// Every comparator is a bit 2-sorter (OR for the larger, AND for the smaller
// bit). Purely combinational. The half-split construction of the selector
// and the default size N = 7, M = 4 (simple majority of seven) are this
// design's choices; the selector with an AND follows the source.
module sel_bit_voter #(
  parameter int N = 7,
  parameter int M = 4,
  parameter bit TYPE1 = 1'b1
) (
  input  logic [N-1:0] x,
  output logic         y
);
  if (TYPE1 && N >= 2) begin : g_type1
    localparam int NA = N / 2;
    localparam int NB = N - NA;
    logic [NA-1:0] a;
    logic [NB-1:0] b;
    logic [M-1:0]  top;

    bit_sorter #(.N(NA)) u_sort_a (.x(x[NA-1:0]), .y(a));
    bit_sorter #(.N(NB)) u_sort_b (.x(x[N-1:NA]), .y(b));

    for (genvar i = 0; i < M; i++) begin : g_top
      localparam int J = M - 1 - i;
      logic ai, bj;
      if (i < NA) begin : g_a
        assign ai = a[i];
      end else begin : g_a0
        assign ai = 1'b0;
      end
      if (J < NB) begin : g_b
        assign bj = b[J];
      end else begin : g_b0
        assign bj = 1'b0;
      end
      assign top[i] = ai | bj;
    end

    assign y = &top;
  end else begin : g_sorter
    logic [N-1:0] s;
    bit_sorter #(.N(N)) u_sort (.x(x), .y(s));
    assign y = s[M-1];
  end
endmodule

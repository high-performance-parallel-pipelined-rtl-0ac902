// arith_bit_voter: arithmetic weighted threshold bit voter.
//
// y = 1 iff sum(x[i] * VOTES[i]) >= T, i.e. iff -T + sum(x[i] v[i]) is not
// negative. Each product x[i] v[i] is the vote ANDed with its input bit; the
// products and the two's-complement constant -T are SW-bit rows reduced by
// a carry-save tree of full-adder rows (3 rows in, 2 out per group of three)
// until two rows remain, which a carry-propagate adder sums. y is the
// complement of the sign bit. Votes and threshold are fixed parameters, so
// synthesis strips the constant-zero bits of the rows. Purely combinational.
// The default is a 6-input voter with votes 2, 2, 2, 1, 1, 1 and threshold 5.
// VOTES packs input i's vote in bits [i*VW +: VW]. The row-wise carry-save
// tree (rather than a hand-packed column layout) is this design's choice.
module arith_bit_voter #(
  parameter int N  = 6,
  parameter int VW = 2,
  parameter logic [N*VW-1:0] VOTES = {2'd1, 2'd1, 2'd1, 2'd2, 2'd2, 2'd2},
  parameter int T  = 5
) (
  input  logic [N-1:0] x,
  output logic         y
);
  // width that holds -T and the largest possible sum, plus a sign bit
  localparam int SW = $clog2(N * ((1 << VW) - 1) + T + 1) + 1;
  localparam int NR = N + 1;

  function automatic int rows_after(input int lvl);
    int r;
    r = NR;
    for (int l = 0; l < lvl; l++) r = r - r / 3;
    return r;
  endfunction

  function automatic int csa_levels();
    int l;
    l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int LV = csa_levels();

  logic [SW-1:0] total;

  always_comb begin
    logic [SW-1:0] row [NR];
    logic [SW-1:0] nxt [NR];
    logic [SW-1:0] a, b, c;
    for (int i = 0; i < N; i++)
      row[i] = x[i] ? SW'(VOTES[i*VW +: VW]) : '0;
    row[N] = SW'(-T);
    for (int l = 0; l < LV; l++) begin
      // groups of three rows become a sum row and a shifted carry row
      for (int g = 0; g < rows_after(l) / 3; g++) begin
        a = row[3*g];
        b = row[3*g+1];
        c = row[3*g+2];
        nxt[2*g]   = a ^ b ^ c;
        nxt[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      // rows left over pass to the next level unchanged
      for (int r = 3 * (rows_after(l) / 3); r < rows_after(l); r++)
        nxt[r - rows_after(l) / 3] = row[r];
      for (int r = rows_after(l + 1); r < NR; r++)
        nxt[r] = '0;
      row = nxt;
    end
    total = (rows_after(LV) == 2) ? row[0] + row[1] : row[0];
  end

  assign y = ~total[SW-1];
endmodule

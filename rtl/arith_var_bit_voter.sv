// arith_var_bit_voter: arithmetic threshold bit voter with variable votes.
//
// y = 1 iff sum(x[i] * v[i]) >= t, where the votes v[i] (VW bits each) and
// the threshold t (TW bits) are inputs, so they may change on every
// evaluation. Each product x[i] v[i] is VW AND gates; the products and the
// two's-complement constant -t are SW-bit rows, reduced by a carry-save tree
// of full-adder rows (groups of three rows become a sum row and a carry row)
// until two remain, and a carry-propagate adder sums those. y is the
// complement of the sum's sign bit. Purely combinational. The defaults (6
// inputs, 2-bit votes) are sized for the weighted example of the source;
// TW holds any threshold up to the largest possible sum plus one. The
// row-wise carry-save tree is this design's choice.
module arith_var_bit_voter #(
  parameter int N  = 6,
  parameter int VW = 2,
  parameter int TW = $clog2(N * ((1 << VW) - 1) + 2)
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0][VW-1:0] v,
  input  logic [TW-1:0]        t,
  output logic                 y
);
  localparam int SUMW = $clog2(N * ((1 << VW) - 1) + 1);
  localparam int SW   = ((SUMW > TW) ? SUMW : TW) + 1;
  localparam int NR   = N + 1;

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
      row[i] = SW'(v[i] & {VW{x[i]}});   // AND-gate product x_i v_i
    row[N] = -SW'(t);
    for (int l = 0; l < LV; l++) begin
      for (int g = 0; g < rows_after(l) / 3; g++) begin
        a = row[3*g];
        b = row[3*g+1];
        c = row[3*g+2];
        nxt[2*g]   = a ^ b ^ c;
        nxt[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
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

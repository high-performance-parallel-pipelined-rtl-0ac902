// mux_bit_voter: weighted threshold bit voter by multiplexer decomposition.
//
// y = 1 iff sum(x[i] * VOTES[i]) >= T. Input 0 is taken as the select of a
// 2:1 multiplexer: if it is 1, the remaining inputs 1..N-1 must still supply
// T - VOTES[0] votes; if 0, they must supply T. Each branch is again such a
// voter over inputs 2..N-1, and so on, until a residual function is trivial:
// constant 1 (threshold <= 0), constant 0 (threshold above the sum of the
// remaining votes), a single OR (any one remaining input suffices) or a
// single AND (all remaining inputs are needed). Sub-voters with the same
// inputs and threshold are built once and shared: sub[i][t] is the voter of
// inputs i..N-1 with threshold t, computed from the last input back to the
// first. Inputs must be ordered by descending vote, input 0 the highest, so
// that the largest votes drive the first multiplexers. All votes are assumed
// non-zero. Purely combinational. VOTES packs input i's vote in bits
// [i*VW +: VW]. The default is the 6-input voter with votes 2, 2, 2, 1, 1, 1
// and threshold 5. The sharing table and 2:1 multiplexers throughout are this
// design's choices.
module mux_bit_voter #(
  parameter int N  = 6,
  parameter int VW = 2,
  parameter logic [N*VW-1:0] VOTES = {2'd1, 2'd1, 2'd1, 2'd2, 2'd2, 2'd2},
  parameter int T  = 5
) (
  input  logic [N-1:0] x,
  output logic         y
);
  // vote of input i
  function automatic int vote(input int i);
    return int'(VOTES[i*VW +: VW]);
  endfunction

  // sum of the votes of inputs i..N-1
  function automatic int rest_sum(input int i);
    int s;
    s = 0;
    for (int j = i; j < N; j++) s += vote(j);
    return s;
  endfunction

  // smallest vote among inputs i..N-1
  function automatic int rest_min(input int i);
    int m;
    m = vote(i);
    for (int j = i + 1; j < N; j++) if (vote(j) < m) m = vote(j);
    return m;
  endfunction

  localparam int TMAX = rest_sum(0) + 1;   // any larger threshold is constant 0

  // clamp a threshold into the table's range
  function automatic int clamp(input int t);
    return (t < 0) ? 0 : (t > TMAX) ? TMAX : t;
  endfunction

  logic [TMAX:0] sub [N+1];

  always_comb begin
    // no inputs left: only a threshold <= 0 is met
    sub[N] = '0;
    sub[N][0] = 1'b1;
    for (int i = N - 1; i >= 0; i--) begin
      for (int t = 0; t <= TMAX; t++) begin
        if (t <= 0)
          sub[i][t] = 1'b1;                          // constant 1
        else if (t > rest_sum(i))
          sub[i][t] = 1'b0;                          // constant 0
        else if (t <= rest_min(i))
          sub[i][t] = |(x >> i);                     // single OR
        else if (t == rest_sum(i))
          sub[i][t] = &(x | ~({N{1'b1}} << i));      // single AND of inputs i..N-1
        else                                         // 2:1 multiplexer on input i
          sub[i][t] = x[i] ? sub[i+1][clamp(t - vote(i))] : sub[i+1][t];
      end
    end
  end

  assign y = sub[0][clamp(T)];
endmodule

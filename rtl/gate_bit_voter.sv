// gate_bit_voter: m-out-of-n bit voter as two-level logic.
//
// y = 1 iff at least M of the N input bits are 1. Two realisations:
//   AND-OR: the OR of one M-input AND term per M-subset of the inputs;
//   OR-AND: the AND of one (N-M+1)-input OR term per (N-M+1)-subset
//           (at least M ones means no N-M+1 inputs are all zero).
// AND_OR selects the form; its default picks AND-OR exactly when
// M > (N+1)/2, the case in which that form needs fewer gates and gate
// inputs. The number of terms grows as a binomial coefficient, so this form
// is only sensible for small N. Purely combinational. No fan-in limit is
// modelled: a multi-level version with bounded fan-in is left to synthesis.
// N = 7, M = 4 (simple majority of seven) is this design's default size.
module gate_bit_voter #(
  parameter int N = 7,
  parameter int M = 4,
  parameter bit AND_OR = (2 * M > N + 1)
) (
  input  logic [N-1:0] x,
  output logic         y
);
  always_comb begin
    if (AND_OR) begin
      y = 1'b0;
      for (int s = 0; s < (1 << N); s++)
        if ($countones(N'(s)) == M)
          y = y | (&(x | ~N'(s)));
    end else begin
      y = 1'b1;
      for (int s = 0; s < (1 << N); s++)
        if ($countones(N'(s)) == N - M + 1)
          y = y & (|(x & N'(s)));
    end
  end
endmodule

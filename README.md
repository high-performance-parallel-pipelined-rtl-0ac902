# Parallel pipelined voting networks

Systems built from redundant channels (spare hardware, diverse programs,
diverse data) must vote on the channels' results. A voter takes `n` inputs
`x_i`, each with a vote `v_i`, and produces a value `y` backed by enough
votes. This RTL implements the voting networks of *High-Performance Parallel
Pipelined Voting Networks*. It has two families:

* **Bit voters**: one output bit that is 1 when the inputs voting 1 reach a
  threshold. There are four ways to build one: two-level logic, a selection
  network, a carry-save adder, and a tree of multiplexers. The adder form
  also comes with votes and threshold as inputs.
* **Word voters**: `n` words of `k` bits, each with a `b`-bit vote. The output
  is a word `y` with the largest total vote, its total `w`, and a quorum flag
  `w >= thresh`. There are two architectures, a three-phase one and a
  two-phase one. Both are pipelined and take one new vote set every clock.

Why not vote each bit of a word on its own? With a threshold at or below half
the total vote, per-bit voting can build a word that no input holds. It can
also report a quorum that no single value has. The word voters vote on whole
words, so `y` is always one of the inputs.

## Bit voters

All are combinational. Each has an `x` input vector and one output `y`.

| module | function | how it works |
|---|---|---|
| `gate_bit_voter` | `y = 1` iff at least `M` of `N` bits are 1 | Two-level logic. AND-OR is an OR of one AND per `M`-subset. OR-AND is an AND of one OR per `(N-M+1)`-subset. By default AND-OR is used exactly when `M > (N+1)/2`, the case where it is the smaller form. The size grows as a binomial coefficient. |
| `sel_bit_voter` | same | Bit comparators: an OR gate gives the larger bit, an AND gate the smaller. By default (`TYPE1=1`) the two halves of the input are sorted, and line `i` of one half is ORed with line `M-1-i` of the other. That puts the `M` largest bits on `M` lines in no order, and an `M`-input AND gives the vote. With `TYPE1=0`, a full sorter is read at line `M-1`. |
| `arith_bit_voter` | `y = 1` iff `sum(x_i*v_i) >= T`, fixed votes | The AND gates form the rows `x_i*v_i`. These rows and the constant `-T` go through a carry-save tree of full-adder rows, then a final adder. `y` is the inverted sign bit. Constant-zero bits are removed by synthesis. |
| `mux_bit_voter` | same | Decomposition. Input 0, the highest vote, drives a 2:1 mux. Its two branches are voters over the other inputs, with thresholds `T - v_0` and `T`, and so on down the inputs. The decomposition ends at a constant, an OR or an AND. A sub-voter for inputs `i..N-1` at threshold `t` is built once and shared. Inputs must be in descending vote order. |
| `arith_var_bit_voter` | `y = 1` iff `sum(x_i*v_i) >= t`, votes `v` and threshold `t` are inputs | Same adder tree as `arith_bit_voter`, but here the AND gates are real, and the votes and threshold can change on every evaluation. |

The weighted voters default to six inputs with votes 2, 2, 2, 1, 1, 1 and
threshold 5. The threshold `-5 + 2x1 + 2x2 + 2x3 + x4 + x5 + x6 >= 0` is what
both compute. In the `VOTES` parameter, input `i`'s vote is in bits
`[i*VW +: VW]`.

The gate-level and multiplexer forms are smallest for small `n`. Selection
networks are cheapest for larger `n`. The arithmetic form is the natural one
when votes are unequal. The RTL does not model gate fan-in limits.

## Word voters

### Three-phase: sort, combine, select (`word_voter_3phase`)

1. **Sort** (`wv_sort_network`, `VOTER_CELLS=0`). A sorting network of
   `sorter2_cell` comparators puts the `(x, v)` pairs in ascending order of
   `x`. Each vote stays with its word.
2. **Combine** (`wv_combiner`). After sorting, equal words sit on adjacent
   lines. A segmented suffix sum gives line `i` the sum of the votes of lines
   `i, i+1, ...` that carry the same word, so the first line of each run holds
   the run's total. Level `j` has span `d = 2^j` and runs while `d < N`. At
   each level, every line `i` with `i+d < N` does this:

   `v_i <- v_i + (x_i == x_{i+d} ? v_{i+d} : 0)`   (`combiner2_cell`)

   This works because the input is sorted: if `x_i == x_{i+d}`, every line
   between them carries the same word. After the level, line `i` covers
   `[i, i+2d)`. The count is `(N-1) + (N-2) + (N-4) + ...` cells in
   `ceil(lg N)` levels.
3. **Select** (`wv_max_selector`). A binary tree of `selector2_cell`s keeps
   the pair with the larger vote: `N-1` cells in `ceil(lg N)` levels. The
   other lines of a run hold partial sums no larger than the run's first
   line, so they never win wrongly. On a tie the lower line wins.

### Two-phase: 2-voter network, select (`word_voter_2phase`)

Phases 1 and 2 become one network. The same sorting network is used, but
every comparator is a `voter2_cell`:

* If the two words differ, the cell swaps them as a sorter would, each vote
  moving with its word.
* If the two words are equal, the cell combines them. `lo` gets the word with
  the sum of both votes. `hi` gets the word with a vote of 0.

The combining rule is a choice made in this RTL, because the scheme only says
the cell "combines". Putting the sum on one output and zero on the other
keeps each value's total vote unchanged. With it, each value's full total
ends up on one line at the network output, which is what the max selector
needs. `tb_wv_sort_network` checks this at 5 and 16 lines, and
`tb_word_voter_2phase` checks it end to end. The other obvious rule, copying
`vb` to `hi`, counts votes twice and gives wrong totals.

Compared with the three-phase design, the two-phase design uses fewer cells
but more complex ones. When the cell costs are taken into account, either
design can be the cheaper one. It is also the lower-latency design here: 9
cycles against 12 at `N = 5`.

### Sorting network

Both word voters and `sel_bit_voter` use Batcher's odd-even merge sort,
extended to any `N`. `voting_pkg::batcher_partner(n, level, line)` gives the
schedule at elaboration time. It has `t(t+1)/2` levels with `t = ceil(lg N)`.
That is 9 comparators in 6 levels for `N = 5`, and 63 in 10 levels for
`N = 16`. Any sorting network would do. Optimal networks for a particular
`N` would save a few cells.

### Timing and interface

Word voter ports: `clk`, `rst_n`, `in_valid`, `x[N][K]`, `v[N][B]`, `thresh`,
then `out_valid`, `y[K]`, `w[W]` and `quorum`, with `W = B + ceil(lg N)`.

* Every level of cells is followed by a register stage. `in_valid` travels
  alongside the data as `out_valid`. There is no back-pressure: a set is
  accepted on every cycle that `in_valid` is high.
* Latency at the defaults (`N = 5`): 12 cycles for the three-phase voter
  (6 sort + 3 combine + 3 select) and 9 cycles for the two-phase voter
  (6 + 3). In general it is `t(t+1)/2 + 2*ceil(lg N)` for three-phase and
  `t(t+1)/2 + ceil(lg N)` for two-phase.
* `rst_n` is synchronous and active low. It clears only the valid bits, so it
  flushes the pipeline.
* `thresh` is meant as a static setting. It is compared with the `w` that
  leaves the pipeline, not carried along with the data.
* Setting `PIPELINED = 0` on the three network modules, or on a word voter,
  gives purely combinational logic. `tb_word_voter_comb` checks that setting
  for both word voters.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| word voters | `N` inputs | 5 | chosen; `n` is symbolic in the scheme, and sizes 2 to 16 are evaluated |
| word voters | `K` data bits | 16 | the word length used in the source's discussion |
| word voters | `B` vote bits | 4 | chosen |
| `gate_bit_voter`, `sel_bit_voter` | `N`, `M` | 7, 4 | chosen (simple majority of seven) |
| `arith_bit_voter`, `mux_bit_voter` | `N`, `VOTES`, `T` | 6, {2,2,2,1,1,1}, 5 | the worked example of the source |
| `arith_var_bit_voter` | `N`, `VW`, `TW` | 6, 2, 5 | chosen, sized for the worked example |

`voting_networks_top` places all seven voters side by side. The two unweighted
bit voters share `bv_x`. The two fixed-vote weighted ones share `wbv_x`.
The variable-vote voter has its own `vbv_x`, `vbv_v` and `vbv_t`. The two word
voters share `x`, `v` and `thresh`. So each pair of outputs should agree,
except that on a tie the two word voters may return different words with the
same `w`.

## Where this RTL departs from or adds to the source

* The pipeline registers, the valid bits, the reset, the widths `B` and `W`,
  the quorum compare, the ascending sort order and the tie rule are all
  choices made here.
* Sorting network: Batcher's network is used instead of optimal ones.
* Selection bit voter: the source recommends a selector of the `m` largest
  bits, in any order, followed by an AND, but gives no construction for it.
  The half-sort-and-OR selector used here is one such construction, not
  necessarily the cheapest.
* Arithmetic bit voter: the carry-save tree works on whole rows, with
  constant bits left to synthesis. The source's hand-packed layout of 4 full
  adders and 2 half adders is not reproduced. Parallel counters are not used.
* Multiplexer bit voter: only 2:1 multiplexers are used. Larger
  multiplexers, which can give better designs for some vote sets, are not
  built.
* The combiner has `ceil(lg N)` cell levels. The delay figure quoted for the
  combiner (`2*floor(lg N) - 1`) counts cell delays in a unit that is not
  defined, and is not reproduced.
* Not built: digit-serial word voters, a vote store for adjustable votes,
  and fan-in-limited multi-level gate voters.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. The bit-voter testbenches
are exhaustive, or random at 16 inputs. The pipelined testbenches stream
random vote sets with bubbles, check each result against a reference tally,
and check its latency in cycles. `tb_voting_networks_top` runs the whole
design at its default parameters. It counts that combining, ties, quorum met
and missed, bubbles, back-to-back input and a mid-stream flush all occurred.
Two more testbenches sweep the sizes `n = 2..16`. `tb_majority_sizes` checks
every bit voter as a simple-majority voter; the two-level voter only goes up
to `n = 12`. `tb_word_voter_sizes` checks both word voters, with 8-bit words
and 3-bit votes, including their latencies.

```
verilator --binary --timing --assert -Irtl -Itb rtl/voting_pkg.sv \
    tb/tb_voting_networks_top.sv --top-module tb_voting_networks_top
./obj_dir/Vtb_voting_networks_top
```

Swap in any other `tb_*` name the same way. The package must be listed first,
and the other modules are found through `-Irtl`. Each testbench finishes in
under a minute.

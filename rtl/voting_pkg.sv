// voting_pkg: elaboration-time helpers shared by the voting networks.
//
// The sorting-based networks (the bit selection voter and the word-level
// sort and sort/combine networks) are built from Batcher's odd-even merge
// sort, generalised to any line count n. Its comparators fall into
// t(t+1)/2 levels, t = ceil(lg n); every comparator in a level acts on
// disjoint lines, so each level is one rank of cells and, when pipelined,
// one register stage. batcher_partner() tells, for one level and one line,
// which line it is compared with (or -1 if it idles in that level); the
// smaller line index of a pair is the "low" output of the comparator.
// Batcher's construction is this design's choice: the text only asks for
// an optimal or near-optimal n-sorter.
package voting_pkg;

  // Number of comparator levels of the n-line Batcher network.
  function automatic int batcher_levels(input int n);
    int cnt;
    cnt = 0;
    for (int p = 1; p < n; p = p * 2)
      for (int k = p; k >= 1; k = k / 2)
        cnt++;
    return cnt;
  endfunction

  // Partner line of `line` in comparator level `lvl`, or -1 if none.
  function automatic int batcher_partner(input int n, input int lvl, input int line);
    int idx;
    int res;
    idx = 0;
    res = -1;
    for (int p = 1; p < n; p = p * 2)
      for (int k = p; k >= 1; k = k / 2) begin
        if (idx == lvl) begin
          for (int j = k % p; j + k < n; j = j + 2 * k)
            for (int i = 0; i < k && i + j + k < n; i++)
              if ((i + j) / (2 * p) == (i + j + k) / (2 * p)) begin
                if (i + j == line)     res = i + j + k;
                if (i + j + k == line) res = i + j;
              end
        end
        idx++;
      end
    return res;
  endfunction

  // Number of comparators in the whole n-line Batcher network.
  function automatic int batcher_cells(input int n);
    int cnt;
    cnt = 0;
    for (int l = 0; l < batcher_levels(n); l++)
      for (int a = 0; a < n; a++)
        if (batcher_partner(n, l, a) > a) cnt++;
    return cnt;
  endfunction

  // Levels of the n-combiner: spans 1, 2, 4, ... below n.
  function automatic int combiner_levels(input int n);
    int cnt;
    cnt = 0;
    for (int d = 1; d < n; d = d * 2) cnt++;
    return cnt;
  endfunction

  // Number of lines still alive after `lvl` levels of a halving tree.
  function automatic int tree_width(input int n, input int lvl);
    int w;
    w = n;
    for (int l = 0; l < lvl; l++) w = (w + 1) / 2;
    return w;
  endfunction

endpackage

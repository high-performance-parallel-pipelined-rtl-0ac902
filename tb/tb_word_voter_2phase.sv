// tb_word_voter_2phase: streams random vote sets through the pipelined
// two-phase word voter (default 5 inputs, and 16 inputs) and checks each
// result against a reference tally: w must equal the largest total vote of
// any value, y must be a value with that total, quorum must be w >= thresh,
// and every result must appear exactly the pipeline latency after its
// input, with a new set accepted on every valid cycle.
module tb_word_voter_2phase;
  import voting_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, combines = 0, ties = 0, no_quorum = 0, yes_quorum = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define WV_LANE(NAME, NN, KK, BB, LATF)                                          \
    logic                    NAME``_iv, NAME``_ov, NAME``_q;                       \
    logic [NN-1:0][KK-1:0]   NAME``_x;                                             \
    logic [NN-1:0][BB-1:0]   NAME``_v;                                             \
    logic [KK-1:0]           NAME``_y;                                             \
    logic [BB+$clog2(NN)-1:0] NAME``_w, NAME``_t;                                  \
    typedef struct { int c; int wmax; logic [NN-1:0][KK-1:0] x; logic [NN-1:0][BB-1:0] v; } NAME``_exp_t; \
    NAME``_exp_t NAME``_fifo [$];                                                  \
    word_voter_2phase #(.N(NN), .K(KK), .B(BB)) NAME``_dut (                       \
      .clk, .rst_n, .in_valid(NAME``_iv), .x(NAME``_x), .v(NAME``_v),              \
      .thresh(NAME``_t), .out_valid(NAME``_ov), .y(NAME``_y), .w(NAME``_w),        \
      .quorum(NAME``_q));                                                          \
    always @(negedge clk) if (rst_n) begin                                         \
      if (NAME``_ov) begin                                                         \
        NAME``_exp_t e;                                                            \
        int ty;                                                                    \
        checks++;                                                                  \
        if (NAME``_fifo.size() == 0) failures++;                                   \
        else begin                                                                 \
          e = NAME``_fifo.pop_front();                                             \
          ty = 0;                                                                  \
          for (int i = 0; i < NN; i++) if (e.x[i] == NAME``_y) ty += int'(e.v[i]); \
          if (cycle - e.c != (LATF)) failures++;                                   \
          if (int'(NAME``_w) != e.wmax || ty != e.wmax) failures++;                \
          if (NAME``_q != (NAME``_w >= NAME``_t)) failures++;                      \
          if (NAME``_q) yes_quorum++; else no_quorum++;                            \
        end                                                                        \
      end                                                                          \
      NAME``_iv = ($urandom % 8) != 0;                                             \
      for (int i = 0; i < NN; i++) begin                                           \
        NAME``_x[i] = KK'($urandom % 3);                                           \
        if ($urandom % 4 == 0) NAME``_x[i] = KK'($urandom);                        \
        NAME``_v[i] = BB'($urandom);                                               \
      end                                                                          \
      if (NAME``_iv) begin                                                         \
        NAME``_exp_t e;                                                            \
        int best, cnt, tot;                                                        \
        e.c = cycle; e.x = NAME``_x; e.v = NAME``_v;                               \
        best = 0; cnt = 0;                                                         \
        for (int i = 0; i < NN; i++) begin                                         \
          tot = 0;                                                                 \
          for (int j = 0; j < NN; j++) if (NAME``_x[j] == NAME``_x[i]) tot += int'(NAME``_v[j]); \
          if (tot > best) best = tot;                                              \
        end                                                                        \
        for (int i = 0; i < NN; i++) begin                                         \
          tot = 0;                                                                 \
          for (int j = 0; j < NN; j++) if (NAME``_x[j] == NAME``_x[i]) tot += int'(NAME``_v[j]); \
          if (tot == best) begin                                                   \
            logic first; first = 1'b1;                                                  \
            for (int j = 0; j < i; j++) if (NAME``_x[j] == NAME``_x[i]) first = 1'b0; \
            if (first) cnt++;                                                      \
          end                                                                      \
          for (int j = i + 1; j < NN; j++) if (NAME``_x[j] == NAME``_x[i]) combines++; \
        end                                                                        \
        if (cnt > 1) ties++;                                                       \
        e.wmax = best;                                                             \
        NAME``_fifo.push_back(e);                                                  \
      end                                                                          \
    end

  `WV_LANE(a, 5, 16, 4, batcher_levels(5) + $clog2(5))
  `WV_LANE(b, 16, 8, 3, batcher_levels(16) + $clog2(16))

  initial begin
    a_iv = 1'b0; b_iv = 1'b0;
    a_t = 7'd20; b_t = 7'd24;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    a_t = 7'd0;  // every result then has a quorum
    repeat (100) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    checks++;
    if (combines == 0 || ties == 0 || no_quorum == 0 || yes_quorum == 0) failures++;
    checks++;
    if (a_fifo.size() > 20 || b_fifo.size() > 40) failures++;
    $display("combines=%0d ties=%0d quorum=%0d no_quorum=%0d", combines, ties, yes_quorum, no_quorum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wv_sort_network: streams random data-vote sets through the network.
// Sorter form (default, 5 lines, and 16 lines): outputs must be in ascending
// order and be the same multiset of (data, vote) pairs as the inputs.
// Voter form (5 and 16 lines): outputs ascending, and for every value the
// vote total must be conserved and sit whole on one line. Every result must
// come out exactly batcher_levels(N) cycles after its input.
module tb_wv_sort_network;
  import voting_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, swaps = 0, merges = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define SN_LANE(NAME, NN, VC)                                                     \
    logic NAME``_iv, NAME``_ov;                                                     \
    logic [NN-1:0][7:0] NAME``_x, NAME``_xo;                                        \
    logic [NN-1:0][7:0] NAME``_v, NAME``_vo;                                        \
    typedef struct { int c; logic [NN-1:0][7:0] x; logic [NN-1:0][7:0] v; } NAME``_e_t; \
    NAME``_e_t NAME``_fifo [$];                                                     \
    wv_sort_network #(.N(NN), .K(8), .W(8), .VOTER_CELLS(VC)) NAME``_dut (          \
      .clk, .rst_n, .in_valid(NAME``_iv), .x_in(NAME``_x), .v_in(NAME``_v),         \
      .out_valid(NAME``_ov), .x_out(NAME``_xo), .v_out(NAME``_vo));                 \
    always @(negedge clk) if (rst_n) begin                                          \
      if (NAME``_ov) begin                                                          \
        NAME``_e_t e;                                                               \
        checks++;                                                                   \
        if (NAME``_fifo.size() == 0) failures++;                                    \
        else begin                                                                  \
          e = NAME``_fifo.pop_front();                                              \
          if (cycle - e.c != batcher_levels(NN)) failures++;                        \
          for (int i = 0; i + 1 < NN; i++) if (NAME``_xo[i] > NAME``_xo[i+1]) failures++; \
          for (int i = 0; i < NN; i++) if (NAME``_xo[i] != e.x[i]) swaps++;         \
          if (!(VC)) begin                                                          \
            for (int i = 0; i < NN; i++) begin                                      \
              int ci, co;                                                           \
              ci = 0; co = 0;                                                       \
              for (int j = 0; j < NN; j++) begin                                    \
                if (e.x[j] == e.x[i] && e.v[j] == e.v[i]) ci++;                     \
                if (NAME``_xo[j] == e.x[i] && NAME``_vo[j] == e.v[i]) co++;         \
              end                                                                   \
              if (ci != co) failures++;                                             \
            end                                                                     \
          end else begin                                                            \
            for (int i = 0; i < NN; i++) begin                                      \
              int ti, mo, cnt;                                                      \
              ti = 0; mo = 0; cnt = 0;                                              \
              for (int j = 0; j < NN; j++) begin                                    \
                if (e.x[j] == e.x[i]) begin ti += int'(e.v[j]); cnt++; end          \
                if (NAME``_xo[j] == e.x[i] && int'(NAME``_vo[j]) > mo) mo = int'(NAME``_vo[j]); \
              end                                                                   \
              if (mo != ti) failures++;                                             \
              if (cnt > 1) merges++;                                                \
            end                                                                     \
          end                                                                       \
        end                                                                         \
      end                                                                           \
      NAME``_iv = ($urandom % 6) != 0;                                              \
      for (int i = 0; i < NN; i++) begin                                            \
        NAME``_x[i] = (VC) ? 8'($urandom % 4) : 8'($urandom % 32);                  \
        NAME``_v[i] = (VC) ? 8'($urandom % 15 + 1) : 8'($urandom);                  \
      end                                                                           \
      if (NAME``_iv) begin                                                          \
        NAME``_e_t e;                                                               \
        e.c = cycle; e.x = NAME``_x; e.v = NAME``_v;                                \
        NAME``_fifo.push_back(e);                                                   \
      end                                                                           \
    end

  `SN_LANE(s5, 5, 1'b0)
  `SN_LANE(s16, 16, 1'b0)
  `SN_LANE(v5, 5, 1'b1)
  `SN_LANE(v16, 16, 1'b1)

  initial begin
    s5_iv = 1'b0; s16_iv = 1'b0; v5_iv = 1'b0; v16_iv = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    checks++;
    if (swaps == 0 || merges == 0) failures++;
    checks++;
    if (s5_fifo.size() > 10 || s16_fifo.size() > 12 || v5_fifo.size() > 10 || v16_fifo.size() > 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wv_max_selector: streams random data-vote sets through the max-selector
// tree (default 5 lines, and 16 lines). The output vote must be the largest
// input vote and the output word that of the lowest-numbered line holding
// it. Results must appear ceil(lg N) cycles after input.
module tb_wv_max_selector;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, ties = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define MS_LANE(NAME, NN)                                                         \
    logic NAME``_iv, NAME``_ov;                                                     \
    logic [NN-1:0][7:0] NAME``_x;                                                   \
    logic [NN-1:0][4:0] NAME``_v;                                                   \
    logic [7:0] NAME``_xo;                                                          \
    logic [4:0] NAME``_vo;                                                          \
    typedef struct { int c; logic [NN-1:0][7:0] x; logic [NN-1:0][4:0] v; } NAME``_e_t; \
    NAME``_e_t NAME``_fifo [$];                                                     \
    wv_max_selector #(.N(NN), .K(8), .W(5)) NAME``_dut (                            \
      .clk, .rst_n, .in_valid(NAME``_iv), .x_in(NAME``_x), .v_in(NAME``_v),         \
      .out_valid(NAME``_ov), .x_out(NAME``_xo), .v_out(NAME``_vo));                 \
    always @(negedge clk) if (rst_n) begin                                          \
      if (NAME``_ov) begin                                                          \
        NAME``_e_t e;                                                               \
        int best, at, cnt;                                                          \
        checks++;                                                                   \
        if (NAME``_fifo.size() == 0) failures++;                                    \
        else begin                                                                  \
          e = NAME``_fifo.pop_front();                                              \
          if (cycle - e.c != $clog2(NN)) failures++;                                \
          best = -1; at = 0; cnt = 0;                                               \
          for (int i = 0; i < NN; i++) if (int'(e.v[i]) > best) begin best = int'(e.v[i]); at = i; end \
          for (int i = 0; i < NN; i++) if (int'(e.v[i]) == best) cnt++;             \
          if (cnt > 1) ties++;                                                      \
          if (int'(NAME``_vo) != best || NAME``_xo != e.x[at]) failures++;          \
        end                                                                         \
      end                                                                           \
      NAME``_iv = ($urandom % 6) != 0;                                              \
      for (int i = 0; i < NN; i++) begin                                            \
        NAME``_x[i] = 8'($urandom);                                                 \
        NAME``_v[i] = 5'($urandom % 12);                                            \
      end                                                                           \
      if (NAME``_iv) begin                                                          \
        NAME``_e_t e;                                                               \
        e.c = cycle; e.x = NAME``_x; e.v = NAME``_v;                                \
        NAME``_fifo.push_back(e);                                                   \
      end                                                                           \
    end

  `MS_LANE(m5, 5)
  `MS_LANE(m16, 16)

  initial begin
    m5_iv = 1'b0; m16_iv = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    checks++;
    if (ties == 0) failures++;
    checks++;
    if (m5_fifo.size() > 6 || m16_fifo.size() > 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

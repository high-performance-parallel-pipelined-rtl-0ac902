// tb_wv_combiner: streams sorted random data-vote sets through the n-combiner
// (default 5 lines, and 16 lines) and checks every line against a direct
// segmented suffix sum: line i must hold the votes of all lines j >= i that
// carry the same word. Results must appear ceil(lg N) cycles after input.
module tb_wv_combiner;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, combines = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define CB_LANE(NAME, NN)                                                         \
    logic NAME``_iv, NAME``_ov;                                                     \
    logic [NN-1:0][5:0] NAME``_x, NAME``_xo;                                        \
    logic [NN-1:0][7:0] NAME``_v, NAME``_vo;                                        \
    typedef struct { int c; logic [NN-1:0][5:0] x; logic [NN-1:0][7:0] v; } NAME``_e_t; \
    NAME``_e_t NAME``_fifo [$];                                                     \
    wv_combiner #(.N(NN), .K(6), .W(8)) NAME``_dut (                                \
      .clk, .rst_n, .in_valid(NAME``_iv), .x_in(NAME``_x), .v_in(NAME``_v),         \
      .out_valid(NAME``_ov), .x_out(NAME``_xo), .v_out(NAME``_vo));                 \
    always @(negedge clk) if (rst_n) begin                                          \
      if (NAME``_ov) begin                                                          \
        NAME``_e_t e;                                                               \
        checks++;                                                                   \
        if (NAME``_fifo.size() == 0) failures++;                                    \
        else begin                                                                  \
          e = NAME``_fifo.pop_front();                                              \
          if (cycle - e.c != $clog2(NN)) failures++;                                \
          for (int i = 0; i < NN; i++) begin                                        \
            int s;                                                                  \
            s = 0;                                                                  \
            for (int j = i; j < NN; j++) if (e.x[j] == e.x[i]) s += int'(e.v[j]);   \
            if (int'(NAME``_vo[i]) != s || NAME``_xo[i] != e.x[i]) begin failures++; if (failures < 4) $display("N=%0d i=%0d got %0d exp %0d x=%p v=%p", NN, i, NAME``_vo[i], s, e.x, e.v); end \
            if (int'(NAME``_vo[i]) != int'(e.v[i])) combines++;                     \
          end                                                                       \
        end                                                                         \
      end                                                                           \
      NAME``_iv = ($urandom % 6) != 0;                                              \
      begin                                                                         \
        int run;                                                                    \
        run = int'($urandom % 4);                                                   \
        for (int i = 0; i < NN; i++) begin                                          \
          NAME``_x[i] = 6'(run);                                                    \
          if ($urandom % 3 == 0) run++;                                             \
        end                                                                         \
      end                                                                           \
      for (int i = 0; i < NN; i++) NAME``_v[i] = 8'($urandom % 16);                 \
      if (NAME``_iv) begin                                                          \
        NAME``_e_t e;                                                               \
        e.c = cycle; e.x = NAME``_x; e.v = NAME``_v;                                \
        NAME``_fifo.push_back(e);                                                   \
      end                                                                           \
    end

  `CB_LANE(c5, 5)
  `CB_LANE(c16, 16)

  initial begin
    c5_iv = 1'b0; c16_iv = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    checks++;
    if (combines == 0) failures++;
    checks++;
    if (c5_fifo.size() > 6 || c16_fifo.size() > 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

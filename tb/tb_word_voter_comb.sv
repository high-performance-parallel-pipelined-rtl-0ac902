// tb_word_voter_comb: both word voters built without pipeline registers
// (PIPELINED = 0) at 5 and 9 inputs. Random vote sets are applied and,
// after a short settling delay, w must be the largest total vote of any
// value, y a value with that total, and quorum must be w >= thresh, with
// out_valid following in_valid in the same cycle.
module tb_word_voter_comb;
  localparam int K = 8, B = 4;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define COMB_LANE(NAME, NN)                                                      \
    logic [NN-1:0][K-1:0] NAME``_x;                                                \
    logic [NN-1:0][B-1:0] NAME``_v;                                                \
    logic NAME``_iv, NAME``_ov3, NAME``_ov2, NAME``_q3, NAME``_q2;                 \
    logic [K-1:0] NAME``_y3, NAME``_y2;                                            \
    logic [B+$clog2(NN)-1:0] NAME``_w3, NAME``_w2, NAME``_t;                       \
    word_voter_3phase #(.N(NN), .K(K), .B(B), .PIPELINED(1'b0)) NAME``_u3 (        \
      .clk(1'b0), .rst_n(1'b1), .in_valid(NAME``_iv), .x(NAME``_x), .v(NAME``_v),  \
      .thresh(NAME``_t), .out_valid(NAME``_ov3), .y(NAME``_y3), .w(NAME``_w3),     \
      .quorum(NAME``_q3));                                                         \
    word_voter_2phase #(.N(NN), .K(K), .B(B), .PIPELINED(1'b0)) NAME``_u2 (        \
      .clk(1'b0), .rst_n(1'b1), .in_valid(NAME``_iv), .x(NAME``_x), .v(NAME``_v),  \
      .thresh(NAME``_t), .out_valid(NAME``_ov2), .y(NAME``_y2), .w(NAME``_w2),     \
      .quorum(NAME``_q2));                                                         \
    task automatic NAME``_step();                                                  \
      int best, ty3, ty2, t;                                                       \
      NAME``_iv = 1'($urandom);                                                    \
      NAME``_t = ($bits(NAME``_t))'($urandom % 40);                                \
      for (int i = 0; i < NN; i++) begin                                           \
        NAME``_x[i] = K'($urandom % 4);                                            \
        NAME``_v[i] = B'($urandom);                                                \
      end                                                                          \
      #1;                                                                          \
      best = 0; ty3 = 0; ty2 = 0;                                                  \
      for (int i = 0; i < NN; i++) begin                                           \
        t = 0;                                                                     \
        for (int j = 0; j < NN; j++) if (NAME``_x[j] == NAME``_x[i]) t += int'(NAME``_v[j]); \
        if (t > best) best = t;                                                    \
        if (NAME``_x[i] == NAME``_y3) ty3 += int'(NAME``_v[i]);                    \
        if (NAME``_x[i] == NAME``_y2) ty2 += int'(NAME``_v[i]);                    \
      end                                                                          \
      checks += 2;                                                                 \
      if (int'(NAME``_w3) != best || ty3 != best || NAME``_q3 != (NAME``_w3 >= NAME``_t) || NAME``_ov3 != NAME``_iv) failures++; \
      if (int'(NAME``_w2) != best || ty2 != best || NAME``_q2 != (NAME``_w2 >= NAME``_t) || NAME``_ov2 != NAME``_iv) failures++; \
    endtask

  `COMB_LANE(a, 5)
  `COMB_LANE(b, 9)

  initial begin
    for (int k = 0; k < 3000; k++) begin
      a_step();
      b_step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

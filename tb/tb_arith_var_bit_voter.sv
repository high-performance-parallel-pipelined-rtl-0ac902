// tb_arith_var_bit_voter: the variable-vote arithmetic voter against a
// direct weighted sum, with random votes and thresholds, at the default six
// 2-bit votes and at nine 3-bit votes. The worked example (votes
// 2,2,2,1,1,1, threshold 5) is also run exhaustively.
module tb_arith_var_bit_voter;
  logic [5:0] x6;
  logic [5:0][1:0] v6;
  logic [4:0] t6;
  logic [8:0] x9;
  logic [8:0][2:0] v9;
  logic [5:0] t9;
  logic y6, y9;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  arith_var_bit_voter dut (.x(x6), .v(v6), .t(t6), .y(y6));
  arith_var_bit_voter #(.N(9), .VW(3)) u9 (.x(x9), .v(v9), .t(t9), .y(y9));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int s;
    v6 = {2'd1, 2'd1, 2'd1, 2'd2, 2'd2, 2'd2};
    t6 = 5'd5;
    for (int k = 0; k < 64; k++) begin
      x6 = 6'(k);
      #1;
      checks++;
      s = 2 * (int'(x6[0]) + int'(x6[1]) + int'(x6[2])) + int'(x6[3]) + int'(x6[4]) + int'(x6[5]);
      if (y6 != (s >= 5)) failures++;
    end
    for (int k = 0; k < 5000; k++) begin
      x6 = 6'($urandom); t6 = 5'($urandom % 20);
      x9 = 9'($urandom); t9 = 6'($urandom % 64);
      for (int i = 0; i < 6; i++) v6[i] = 2'($urandom);
      for (int i = 0; i < 9; i++) v9[i] = 3'($urandom);
      #1;
      checks += 2;
      s = 0;
      for (int i = 0; i < 6; i++) if (x6[i]) s += int'(v6[i]);
      if (y6 != (s >= int'(t6))) failures++;
      if (y6) ones++; else zeros++;
      s = 0;
      for (int i = 0; i < 9; i++) if (x9[i]) s += int'(v9[i]);
      if (y9 != (s >= int'(t9))) failures++;
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

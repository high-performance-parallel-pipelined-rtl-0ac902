// tb_sel_bit_voter: the selection-network bit voter, in its selector-plus-AND
// form and its sorter form, against a population count: exhaustive at the
// default 4-of-7 and at 2-of-5, random and near the threshold at 9-of-16.
module tb_sel_bit_voter;
  logic [6:0]  x7;
  logic [4:0]  x5;
  logic [15:0] x16;
  logic y7, y5, y16, y7s, y16s;
  int checks = 0, failures = 0;
  sel_bit_voter dut (.x(x7), .y(y7));
  sel_bit_voter #(.N(5), .M(2)) u5 (.x(x5), .y(y5));
  sel_bit_voter #(.N(16), .M(9)) u16 (.x(x16), .y(y16));
  sel_bit_voter #(.N(7), .M(4), .TYPE1(1'b0)) u7s (.x(x7), .y(y7s));
  sel_bit_voter #(.N(16), .M(9), .TYPE1(1'b0)) u16s (.x(x16), .y(y16s));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < 128; s++) begin
      x7 = 7'(s); x5 = 5'(s); x16 = 16'($urandom);
      #1;
      checks += 5;
      if (y7 != ($countones(x7) >= 4)) failures++;
      if (y7s != ($countones(x7) >= 4)) failures++;
      if (y16s != ($countones(x16) >= 9)) failures++;
      if (y5 != ($countones(x5) >= 2)) failures++;
      if (y16 != ($countones(x16) >= 9)) failures++;
    end
    // all patterns with 8 or 9 ones at n = 16, the edge of the threshold
    for (int t = 0; t < 4000; t++) begin
      x16 = '0;
      for (int k = 0; k < 8 + (t % 2); k++) x16[$urandom % 16] = 1'b1;
      #1;
      checks += 2;
      if (y16 != ($countones(x16) >= 9)) failures++;
      if (y16s != ($countones(x16) >= 9)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

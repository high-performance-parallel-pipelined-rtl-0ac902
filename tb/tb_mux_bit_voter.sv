// tb_mux_bit_voter: weighted threshold voter against a direct weighted sum:
// exhaustive for the default (votes 2,2,2,1,1,1, threshold 5) and for votes
// 3,2,2,1 with threshold 4, random for 9 inputs with 3-bit votes.
module tb_mux_bit_voter;
  localparam logic [11:0] V4 = {3'd1, 3'd2, 3'd2, 3'd3};
  localparam logic [26:0] V9 = {3'd1, 3'd1, 3'd2, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
  logic [5:0] x6;
  logic [3:0] x4;
  logic [8:0] x9;
  logic y6, y4, y9;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  mux_bit_voter dut (.x(x6), .y(y6));
  mux_bit_voter #(.N(4), .VW(3), .VOTES(V4), .T(4)) u4 (.x(x4), .y(y4));
  mux_bit_voter #(.N(9), .VW(3), .VOTES(V9), .T(16)) u9 (.x(x9), .y(y9));

  function automatic int wsum6(logic [5:0] x);
    return 2 * (int'(x[0]) + int'(x[1]) + int'(x[2])) + int'(x[3]) + int'(x[4]) + int'(x[5]);
  endfunction
  function automatic int wsum(int n, logic [26:0] votes, logic [8:0] x);
    int s = 0;
    for (int i = 0; i < n; i++) if (x[i]) s += int'(votes[3*i +: 3]);
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < 64; s++) begin
      x6 = 6'(s);
      #1;
      checks++;
      if (y6 != (wsum6(x6) >= 5)) failures++;
      if (y6) ones++; else zeros++;
    end
    for (int s = 0; s < 16; s++) begin
      x4 = 4'(s);
      #1;
      checks++;
      if (y4 != (wsum(4, 27'(V4), 9'(x4)) >= 4)) failures++;
    end
    for (int s = 0; s < 512; s++) begin
      x9 = 9'(s);
      #1;
      checks++;
      if (y9 != (wsum(9, V9, x9) >= 16)) failures++;
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

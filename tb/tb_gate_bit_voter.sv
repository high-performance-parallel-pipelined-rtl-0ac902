// tb_gate_bit_voter: exhaustive check of the two-level m-out-of-n voter in
// both forms (OR-AND at the default 4-of-7, AND-OR at 6-of-7 and at a
// forced 4-of-7) against a population count.
module tb_gate_bit_voter;
  logic [6:0] x;
  logic y_def, y_ao6, y_ao4;
  int checks = 0, failures = 0;
  gate_bit_voter dut (.x(x), .y(y_def));
  gate_bit_voter #(.N(7), .M(6)) u_ao6 (.x(x), .y(y_ao6));
  gate_bit_voter #(.N(7), .M(4), .AND_OR(1'b1)) u_ao4 (.x(x), .y(y_ao4));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < 128; s++) begin
      x = 7'(s);
      #1;
      checks += 3;
      if (y_def != ($countones(x) >= 4)) failures++;
      if (y_ao6 != ($countones(x) >= 6)) failures++;
      if (y_ao4 != ($countones(x) >= 4)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

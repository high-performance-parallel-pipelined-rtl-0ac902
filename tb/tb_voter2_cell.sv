// tb_voter2_cell: random check of the 2-voter: it sorts unequal words with
// their votes and, for equal words, puts the vote sum on lo and zero on hi.
module tb_voter2_cell;
  localparam int K = 3, W = 4;
  logic [K-1:0] xa, xb, xlo, xhi;
  logic [W-1:0] va, vb, vlo, vhi;
  int checks = 0, failures = 0, merges = 0;
  voter2_cell #(.K(K), .W(W)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      xa = K'($urandom); xb = K'($urandom);
      va = W'($urandom % 8); vb = W'($urandom % 8);
      #1;
      checks++;
      if (xa == xb) begin
        merges++;
        if (!(xlo == xa && xhi == xa && vlo == va + vb && vhi == 0)) failures++;
      end else if (xa < xb) begin
        if (!(xlo == xa && vlo == va && xhi == xb && vhi == vb)) failures++;
      end else begin
        if (!(xlo == xb && vlo == vb && xhi == xa && vhi == va)) failures++;
      end
    end
    checks++;
    if (merges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

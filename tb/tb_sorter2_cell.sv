// tb_sorter2_cell: random check of the data-vote 2-sorter against a direct
// reference (smaller word on lo, each vote staying with its word).
module tb_sorter2_cell;
  localparam int K = 4, W = 3;
  logic [K-1:0] xa, xb, xlo, xhi;
  logic [W-1:0] va, vb, vlo, vhi;
  int checks = 0, failures = 0;
  sorter2_cell #(.K(K), .W(W)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      xa = K'($urandom); xb = K'($urandom); va = W'($urandom); vb = W'($urandom);
      #1;
      checks++;
      if (xa <= xb) begin
        if (!(xlo == xa && vlo == va && xhi == xb && vhi == vb)) failures++;
      end else begin
        if (!(xlo == xb && vlo == vb && xhi == xa && vhi == va)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

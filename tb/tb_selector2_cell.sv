// tb_selector2_cell: random check of the 2-selector: the pair with the
// larger vote is passed, input a on a tie.
module tb_selector2_cell;
  localparam int K = 8, W = 3;
  logic [K-1:0] xa, xb, xo;
  logic [W-1:0] va, vb, vo;
  int checks = 0, failures = 0;
  selector2_cell #(.K(K), .W(W)) dut (.*);
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
      if (vb > va) begin
        if (!(xo == xb && vo == vb)) failures++;
      end else begin
        if (!(xo == xa && vo == va)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

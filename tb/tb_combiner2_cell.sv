// tb_combiner2_cell: random check of the 2-combiner: line a gains line b's
// vote exactly when both carry the same word.
module tb_combiner2_cell;
  localparam int K = 3, W = 5;
  logic [K-1:0] xa, xb;
  logic [W-1:0] va, vb, va_out;
  int checks = 0, failures = 0;
  combiner2_cell #(.K(K), .W(W)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      xa = K'($urandom); xb = K'($urandom);
      va = W'($urandom % 16); vb = W'($urandom % 16);
      #1;
      checks++;
      if (va_out != ((xa == xb) ? W'(va + vb) : va)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

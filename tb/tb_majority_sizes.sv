// tb_majority_sizes: simple-majority bit voters over the range of sizes
// n = 2..16 used when comparing the bit-voter designs. For each n, with
// m = floor(n/2) + 1, it builds the selection voter (both forms), the
// multiplexer voter and both arithmetic voters with all votes 1, and the
// two-level voter for n <= 12, and checks each against a population count
// on random inputs, half of them sparser so that counts near the threshold
// occur often.
module tb_majority_sizes;
  logic clk = 1'b0;
  logic [15:0] x;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 2; n <= 16; n++) begin : g_n
    localparam int M = n / 2 + 1;
    logic y_sel, y_sort, y_mux, y_ar, y_av, y_gate;
    sel_bit_voter #(.N(n), .M(M)) u_sel (.x(x[n-1:0]), .y(y_sel));
    sel_bit_voter #(.N(n), .M(M), .TYPE1(1'b0)) u_sort (.x(x[n-1:0]), .y(y_sort));
    mux_bit_voter #(.N(n), .VW(1), .VOTES({n{1'b1}}), .T(M)) u_mux (.x(x[n-1:0]), .y(y_mux));
    arith_bit_voter #(.N(n), .VW(1), .VOTES({n{1'b1}}), .T(M)) u_ar (.x(x[n-1:0]), .y(y_ar));
    arith_var_bit_voter #(.N(n), .VW(1), .TW(5)) u_av (.x(x[n-1:0]), .v({n{1'b1}}), .t(5'(M)), .y(y_av));
    if (n <= 12) begin : g_gate
      gate_bit_voter #(.N(n), .M(M)) u_gate (.x(x[n-1:0]), .y(y_gate));
    end else begin : g_nogate
      assign y_gate = ($countones(x[n-1:0]) >= M);
    end
    always @(posedge clk) begin
      logic e;
      e = $countones(x[n-1:0]) >= M;
      checks += 6;
      if (y_sel != e) failures++;
      if (y_sort != e) failures++;
      if (y_mux != e) failures++;
      if (y_ar != e) failures++;
      if (y_av != e) failures++;
      if (y_gate != e) failures++;
    end
  end

  initial begin
    x = '0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 2 == 0) x = 16'($urandom);
      else begin
        // sparser inputs (about 3 in 8 bits set), nearer the threshold
        x = 16'($urandom) & 16'($urandom | $urandom);
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

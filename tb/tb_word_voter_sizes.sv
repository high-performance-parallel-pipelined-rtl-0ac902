// tb_word_voter_sizes: both pipelined word voters over the range of sizes
// n = 2..16 used when comparing the three-phase and two-phase designs, with
// 8-bit words and 3-bit votes. Each size streams random vote sets (small
// value alphabet, so equal words and ties are common) and every result is
// checked against a reference tally: w is the largest total vote of any
// value, y a value with that total, and the latency is t(t+1)/2 + 2 ceil(lg
// n) cycles for the three-phase and t(t+1)/2 + ceil(lg n) for the two-phase
// voter (t = ceil(lg n)). Every lane must also deliver every set it took.
module tb_word_voter_sizes;
  import voting_pkg::*;
  localparam int K = 8, B = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cycle = 0;
  logic feed = 1'b1, done = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 2; n <= 16; n++) begin : g_n
    localparam int W = B + $clog2(n);
    localparam int LAT3 = batcher_levels(n) + 2 * $clog2(n);
    localparam int LAT2 = batcher_levels(n) + $clog2(n);
    typedef struct { int c; int wmax; logic [n-1:0][K-1:0] x; logic [n-1:0][B-1:0] v; } e_t;
    logic iv, ov3, ov2, q3, q2;
    logic [n-1:0][K-1:0] x;
    logic [n-1:0][B-1:0] v;
    logic [K-1:0] y3, y2;
    logic [W-1:0] w3, w2;
    e_t f3 [$], f2 [$];
    logic reported = 1'b0;

    word_voter_3phase #(.N(n), .K(K), .B(B)) u3 (
      .clk, .rst_n, .in_valid(iv), .x, .v, .thresh(W'(4)),
      .out_valid(ov3), .y(y3), .w(w3), .quorum(q3));
    word_voter_2phase #(.N(n), .K(K), .B(B)) u2 (
      .clk, .rst_n, .in_valid(iv), .x, .v, .thresh(W'(4)),
      .out_valid(ov2), .y(y2), .w(w2), .quorum(q2));

    function automatic int tally(e_t e, logic [K-1:0] val);
      int t = 0;
      for (int i = 0; i < n; i++) if (e.x[i] == val) t += int'(e.v[i]);
      return t;
    endfunction

    function automatic int check(ref e_t f [$], input int lat, input logic [K-1:0] y,
                                 input logic [W-1:0] w, input logic q, input int now);
      e_t e;
      if (f.size() == 0) return 1;
      e = f.pop_front();
      if (now - e.c != lat) return 1;
      if (int'(w) != e.wmax || tally(e, y) != e.wmax) return 1;
      if (q != (w >= W'(4))) return 1;
      return 0;
    endfunction

    always @(negedge clk) begin
      if (rst_n) begin
        if (ov3) begin checks++; failures += check(f3, LAT3, y3, w3, q3, cycle); end
        if (ov2) begin checks++; failures += check(f2, LAT2, y2, w2, q2, cycle); end
      end
      if (done && !reported) begin
        checks++;
        if (f3.size() != 0 || f2.size() != 0) failures++;
        reported = 1'b1;
      end
      iv = rst_n && feed && ($urandom % 4 != 0);
      for (int i = 0; i < n; i++) begin
        x[i] = K'($urandom % 3);
        v[i] = B'($urandom);
      end
      if (iv) begin
        e_t e;
        int best;
        e.c = cycle; e.x = x; e.v = v;
        best = 0;
        for (int i = 0; i < n; i++) if (tally(e, x[i]) > best) best = tally(e, x[i]);
        e.wmax = best;
        f3.push_back(e);
        f2.push_back(e);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (1500) @(posedge clk);
    // stop feeding and let every pipeline drain
    feed = 1'b0;
    repeat (30) @(posedge clk);
    done = 1'b1;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

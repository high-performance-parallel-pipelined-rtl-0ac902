// tb_voting_networks_top: end-to-end run of every voter at the default
// sizes. Each cycle it drives random inputs to all voters. The bit voters
// are checked against a population count and weighted sums (fixed and
// random votes). The two word
// voters get random vote sets, mostly back to back, with bubbles; each
// result is checked against a reference tally and for its latency (12 and
// 9 cycles), so both word voters are held to the same tally. A reset in
// the middle must flush both pipelines. It also counts how often each
// mechanism occurred: combining of equal words, a tie, quorum met and
// missed, a bubble, back-to-back inputs, and both outputs of every bit
// voter. A mechanism that never occurred counts as a failure.
module tb_voting_networks_top;
  localparam int WN = 5, WK = 16, WB = 4, WW = WB + $clog2(WN);
  localparam int LAT3 = 12, LAT2 = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] bv_x;
  logic [5:0] wbv_x;
  logic gate_y, sel_y, arith_y, mux_y, avar_y;
  logic [5:0] vbv_x;
  logic [5:0][1:0] vbv_v;
  logic [4:0] vbv_t;
  logic in_valid;
  logic [WN-1:0][WK-1:0] x;
  logic [WN-1:0][WB-1:0] v;
  logic [WW-1:0] thresh;
  logic out_valid_3p, quorum_3p, out_valid_2p, quorum_2p;
  logic [WK-1:0] y_3p, y_2p;
  logic [WW-1:0] w_3p, w_2p;

  voting_networks_top dut (.*);

  typedef struct {
    int c;
    int wmax;
    logic [WN-1:0][WK-1:0] x;
    logic [WN-1:0][WB-1:0] v;
  } exp_t;
  exp_t q3 [$], q2 [$];

  int checks = 0, failures = 0, cycle = 0;
  int n_combine = 0, n_tie = 0, n_quorum = 0, n_noquorum = 0, n_bubble = 0;
  int n_b2b = 0, n_bit1 = 0, n_bit0 = 0, n_w1 = 0, n_w0 = 0, n_flush = 0, n_v1 = 0, n_v0 = 0;
  logic last_iv = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tally(exp_t e, logic [WK-1:0] val);
    int t = 0;
    for (int i = 0; i < WN; i++) if (e.x[i] == val) t += int'(e.v[i]);
    return t;
  endfunction

  task automatic check_word(ref exp_t fifo [$], input int lat, input logic [WK-1:0] y,
                            input logic [WW-1:0] w, input logic q);
    exp_t e;
    checks++;
    if (fifo.size() == 0) begin
      failures++;
      return;
    end
    e = fifo.pop_front();
    if (cycle - e.c != lat) failures++;
    if (int'(w) != e.wmax || tally(e, y) != e.wmax) failures++;
    if (q != (w >= thresh)) failures++;
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      // ---- check what the previous inputs produced
      checks += 4;
      if (gate_y  != ($countones(bv_x) >= 4)) failures++;
      if (sel_y   != ($countones(bv_x) >= 4)) failures++;
      if (arith_y != (2 * $countones(wbv_x[2:0]) + $countones(wbv_x[5:3]) >= 5)) failures++;
      if (mux_y   != (2 * $countones(wbv_x[2:0]) + $countones(wbv_x[5:3]) >= 5)) failures++;
      begin
        int vs;
        vs = 0;
        for (int i = 0; i < 6; i++) if (vbv_x[i]) vs += int'(vbv_v[i]);
        checks++;
        if (avar_y != (vs >= int'(vbv_t))) failures++;
        if (avar_y) n_v1++; else n_v0++;
      end
      if (gate_y) n_bit1++; else n_bit0++;
      if (arith_y) n_w1++; else n_w0++;
      if (out_valid_3p) begin
        check_word(q3, LAT3, y_3p, w_3p, quorum_3p);
        if (quorum_3p) n_quorum++; else n_noquorum++;
      end
      if (out_valid_2p) check_word(q2, LAT2, y_2p, w_2p, quorum_2p);
    end
    // ---- drive new inputs
    bv_x  = 7'($urandom);
    wbv_x = 6'($urandom);
    vbv_x = 6'($urandom);
    vbv_t = 5'($urandom % 20);
    for (int i = 0; i < 6; i++) vbv_v[i] = 2'($urandom);
    in_valid = rst_n && (($urandom % 5) != 0);
    for (int i = 0; i < WN; i++) begin
      x[i] = WK'($urandom % 3);
      if ($urandom % 3 == 0) x[i] = WK'($urandom);
      v[i] = WB'($urandom);
    end
    if (rst_n) begin
      if (!in_valid) n_bubble++;
      if (in_valid && last_iv) n_b2b++;
    end
    last_iv = in_valid;
    if (in_valid) begin
      exp_t e;
      int best, cnt, t;
      e.c = cycle; e.x = x; e.v = v;
      best = 0; cnt = 0;
      for (int i = 0; i < WN; i++) begin
        t = tally(e, x[i]);
        if (t > best) best = t;
        for (int j = i + 1; j < WN; j++) if (x[j] == x[i]) n_combine++;
      end
      for (int i = 0; i < WN; i++) begin
        logic first;
        first = 1'b1;
        for (int j = 0; j < i; j++) if (x[j] == x[i]) first = 1'b0;
        if (first && tally(e, x[i]) == best) cnt++;
      end
      if (cnt > 1) n_tie++;
      e.wmax = best;
      q3.push_back(e);
      q2.push_back(e);
    end
  end

  initial begin
    thresh = WW'(15);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    // reset in mid-stream: the pipelines must come out empty
    @(negedge clk);
    rst_n = 1'b0;
    q3.delete();
    q2.delete();
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid_3p || out_valid_2p) failures++;
    else n_flush++;
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    checks++;
    if (q3.size() > LAT3 + 1 || q2.size() > LAT2 + 1) failures++;
    checks++;
    if (n_combine == 0 || n_tie == 0 || n_quorum == 0 || n_noquorum == 0 || n_bubble == 0 ||
        n_b2b == 0 || n_bit1 == 0 || n_bit0 == 0 || n_w1 == 0 || n_w0 == 0 || n_flush == 0 || n_v1 == 0 || n_v0 == 0)
      failures++;
    $display("combine=%0d tie=%0d quorum=%0d no_quorum=%0d bubble=%0d back_to_back=%0d flush=%0d",
             n_combine, n_tie, n_quorum, n_noquorum, n_bubble, n_b2b, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_te_branch_map: self-checking test of te_branch_map with two branch ports.
// A queue model holds every recorded branch (1 = not taken) in order; the map must
// show the first min(31, queue length) entries, a flush removes exactly those, and
// is_full/is_empty follow the count. Flushes are withheld for long stretches so the
// map fills and the left-over path is exercised (counted and required).
module tb_te_branch_map;
  logic clk = 0, rst_n = 0;
  logic [1:0] v, tk;
  logic flush;
  logic [4:0] br;
  logic [30:0] map;
  logic full, empty;
  int checks = 0, failures = 0, full_seen = 0, left_seen = 0;
  bit q[$];

  always #5 clk = ~clk;

  te_branch_map #(.N(2)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .branch_taken_i(tk),
    .flush_i(flush), .branches_o(br), .map_o(map), .is_full_o(full), .is_empty_o(empty));

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    v = 0; tk = 0; flush = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check state
      n = (q.size() > 31) ? 31 : q.size();
      checks++;
      if (br != 5'(n) || full != (n == 31) || empty != (n == 0)) begin
        failures++; $display("t=%0d count %0d expected %0d", t, br, n);
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (map[i] != q[i]) begin failures++; $display("t=%0d map[%0d]=%b exp %b", t, i, map[i], q[i]); end
      end
      if (full) full_seen++;
      if (q.size() > 31) left_seen++;
      // drive, never more than the left-over store can hold
      flush = full ? (($urandom % 3) == 0) : (($urandom % 40) == 0);
      v = 2'($urandom); tk = 2'($urandom);
      if (!flush && q.size() >= 31 + 2) v = 0;
      @(posedge clk);
      if (flush) for (int i = 0; i < n; i++) void'(q.pop_front());
      for (int i = 0; i < 2; i++) if (v[i]) q.push_back(!tk[i]);
    end
    checks++; if (full_seen == 0) begin failures++; $display("map never full"); end
    checks++; if (left_seen == 0) begin failures++; $display("left-over store never used"); end
    $display("full cycles=%0d left-over cycles=%0d", full_seen, left_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

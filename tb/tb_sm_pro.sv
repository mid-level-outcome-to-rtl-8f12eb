// tb_sm_pro: end-to-end test of the searching module at its default size
// (eight inputs of six bits, no parameter overrides).
//
// One new input vector is applied every clock cycle and the outputs are
// checked in that same cycle, which shows the module sustains one search
// per cycle with no latency. Expected values are worked out here by a
// linear scan: MIN1, the lowest index holding it, and MIN2 (the second
// smallest, counting repeats). The test also forms what a min-sum check
// node sends back on every edge i, MIN2 when i is the index of MIN1 and
// MIN1 otherwise, and checks it against the minimum over all inputs but i.
//
// Coverage counters, each of which must be hit at least once:
//   pos[i]    MIN1 found at input i, for all eight inputs;
//   lvl[l]    MIN2 taken from the candidate that lost to MIN1 at tree
//             level l (l = 0, 1, 2);
//   ties      minimum occurring twice or more (MIN2 == MIN1);
//   extremes  all inputs zero, and all inputs at the largest value.
module tb_sm_pro;
  localparam int N = 8;
  localparam int W = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        min1, min2;
  logic [2:0]          idx;

  sm_pro dut (.din(din), .min1_o(min1), .min2_o(min2), .idx_o(idx));

  int pos_hits[N];
  int lvl_hits[3];
  int tie_hits = 0, zero_hits = 0, max_hits = 0;
  int cycles = 0;

  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int v[N]);
    int m1, m2, p, lvl, start, ext;
    @(negedge clk);
    for (int i = 0; i < N; i++) din[i] = W'(v[i]);
    @(posedge clk);
    // Reference: linear scan.
    m1 = v[0];
    p = 0;
    for (int i = 1; i < N; i++) if (v[i] < m1) begin m1 = v[i]; p = i; end
    m2 = 2**W;
    for (int i = 0; i < N; i++) if (i != p && v[i] < m2) m2 = v[i];
    checks++;
    if (int'(min1) != m1 || int'(min2) != m2 || int'(idx) != p) begin
      failures++;
      if (failures < 10)
        $display("FAIL in=%p: min1=%0d min2=%0d idx=%0d, expected %0d %0d %0d",
                 v, min1, min2, idx, m1, m2, p);
    end
    // Check-node use: magnitude returned on each edge excludes that edge.
    for (int e = 0; e < N; e++) begin
      ext = 2**W;
      for (int i = 0; i < N; i++) if (i != e && v[i] < ext) ext = v[i];
      checks++;
      if (int'((e == int'(idx)) ? min2 : min1) != ext) begin
        failures++;
        if (failures < 10) $display("FAIL edge %0d magnitude", e);
      end
    end
    // Coverage.
    pos_hits[p]++;
    if (m1 == m2) tie_hits++;
    lvl = -1;
    for (int l = 0; l < 3 && lvl < 0; l++) begin
      start = ((p >> l) ^ 1) << l;
      for (int i = start; i < start + (1 << l); i++) if (v[i] == m2) lvl = l;
    end
    if (lvl >= 0) lvl_hits[lvl]++;
  endtask

  initial begin
    int v[N];
    int c0;
    din = '0;
    @(posedge clk);
    c0 = cycles;
    // Directed: extremes.
    for (int i = 0; i < N; i++) v[i] = 0;
    apply(v);
    zero_hits++;
    for (int i = 0; i < N; i++) v[i] = 2**W - 1;
    apply(v);
    max_hits++;
    // Directed: minimum at every position, second minimum at every level.
    for (int p = 0; p < N; p++) begin
      for (int l = 0; l < 3; l++) begin
        for (int i = 0; i < N; i++) v[i] = 40 + i;
        v[p] = 3;
        v[p ^ (1 << l)] = 9;
        apply(v);
      end
    end
    // Random, narrow and full range.
    for (int t = 0; t < 4000; t++) begin
      int range = (t % 2 == 0) ? 5 : 2**W - 1;
      for (int i = 0; i < N; i++) v[i] = int'($urandom_range(0, range));
      apply(v);
    end
    // One result per cycle: 2 + 24 + 4000 vectors in as many cycles.
    checks++;
    if (cycles - c0 != 4026) begin
      failures++;
      $display("FAIL throughput: %0d cycles for 4026 searches", cycles - c0);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pos_hits[i] == 0) begin failures++; $display("FAIL MIN1 never at input %0d", i); end
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (lvl_hits[l] == 0) begin failures++; $display("FAIL MIN2 never from level %0d", l); end
    end
    checks++;
    if (tie_hits == 0 || zero_hits == 0 || max_hits == 0) begin
      failures++;
      $display("FAIL ties or extremes never exercised");
    end
    $display("coverage: MIN1 position %p, MIN2 level %p, ties %0d", pos_hits, lvl_hits, tie_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sm_pro_sizes: checks the searching module at other input counts:
// N = 2 (a single C1M2), N = 3 and N = 5 (trees with pruned leaves, the
// unused inputs tied to the largest value), and N = 16. Random vectors
// are compared against a linear scan for MIN1, its lowest index and MIN2.
// Counted: for the pruned sizes, vectors whose real inputs all sit at the
// largest value, so that they tie with the padding; the index must still
// point at a real input.
module tb_sm_pro_sizes;
  localparam int W = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pad_ties = 0;

  logic [1:0][W-1:0]  d2;  logic [W-1:0] a2, b2;  logic [0:0] i2;
  logic [2:0][W-1:0]  d3;  logic [W-1:0] a3, b3;  logic [1:0] i3;
  logic [4:0][W-1:0]  d5;  logic [W-1:0] a5, b5;  logic [2:0] i5;
  logic [15:0][W-1:0] d16; logic [W-1:0] a16, b16; logic [3:0] i16;
  logic [127:0][W-1:0] d128; logic [W-1:0] a128, b128; logic [6:0] i128;

  sm_pro #(.N(2),  .W(W)) dut2  (.din(d2),  .min1_o(a2),  .min2_o(b2),  .idx_o(i2));
  sm_pro #(.N(3),  .W(W)) dut3  (.din(d3),  .min1_o(a3),  .min2_o(b3),  .idx_o(i3));
  sm_pro #(.N(5),  .W(W)) dut5  (.din(d5),  .min1_o(a5),  .min2_o(b5),  .idx_o(i5));
  sm_pro #(.N(16), .W(W)) dut16 (.din(d16), .min1_o(a16), .min2_o(b16), .idx_o(i16));
  sm_pro #(.N(128), .W(W)) dut128 (.din(d128), .min1_o(a128), .min2_o(b128), .idx_o(i128));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int v[128], int g1, int g2, int gi);
    int m1, m2, p;
    m1 = v[0];
    p = 0;
    for (int i = 1; i < n; i++) if (v[i] < m1) begin m1 = v[i]; p = i; end
    m2 = 2**W;
    for (int i = 0; i < n; i++) if (i != p && v[i] < m2) m2 = v[i];
    checks++;
    if (g1 != m1 || g2 != m2 || gi != p) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d: got %0d %0d %0d, expected %0d %0d %0d", n, g1, g2, gi, m1, m2, p);
    end
  endtask

  initial begin
    int v[128];
    int allmax;
    for (int t = 0; t < 3000; t++) begin
      if (t < 20) begin
        for (int i = 0; i < 128; i++) v[i] = 2**W - 1;
        if (t >= 10) v[t % 5] = 2**W - 2;
      end else begin
        int range = (t % 3 == 0) ? 3 : 2**W - 1;
        for (int i = 0; i < 128; i++) v[i] = int'($urandom_range(0, range));
      end
      for (int i = 0; i < 2; i++)  d2[i]  = W'(v[i]);
      for (int i = 0; i < 3; i++)  d3[i]  = W'(v[i]);
      for (int i = 0; i < 5; i++)  d5[i]  = W'(v[i]);
      for (int i = 0; i < 16; i++) d16[i] = W'(v[i]);
      for (int i = 0; i < 128; i++) d128[i] = W'(v[i]);
      #1;
      check(2, v, int'(a2), int'(b2), int'(i2));
      check(3, v, int'(a3), int'(b3), int'(i3));
      check(5, v, int'(a5), int'(b5), int'(i5));
      check(16, v, int'(a16), int'(b16), int'(i16));
      check(128, v, int'(a128), int'(b128), int'(i128));
      allmax = 1;
      for (int i = 0; i < 5; i++) if (v[i] != 2**W - 1) allmax = 0;
      if (allmax != 0) pad_ties++;
      @(posedge clk);
    end
    checks++;
    if (pad_ties == 0) begin failures++; $display("FAIL padding tie never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

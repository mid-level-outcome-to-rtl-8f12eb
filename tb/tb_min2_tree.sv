// tb_min2_tree: self-checking test of the C1M1 tree that picks the
// smallest candidate. With NC = 3 (eight-input searching module) all
// triples of 4-bit values are applied; with NC = 5 random vectors are
// used. The expected value is the minimum found by a linear scan.
module tb_min2_tree;
  localparam int W = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0][W-1:0] c3;
  logic [W-1:0]      m3;
  min2_tree #(.NC(3), .W(W)) dut3 (.cand(c3), .min_o(m3));

  logic [4:0][W-1:0] c5;
  logic [W-1:0]      m5;
  min2_tree #(.NC(5), .W(W)) dut5 (.cand(c5), .min_o(m5));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    c5 = '0;
    for (int x = 0; x < 2**(3*W); x++) begin
      c3 = (3*W)'(x);
      #1;
      e = int'(c3[0]);
      for (int i = 1; i < 3; i++) if (int'(c3[i]) < e) e = int'(c3[i]);
      checks++;
      if (int'(m3) != e) begin
        failures++;
        if (failures < 10) $display("FAIL NC=3 cand=%h min=%0d exp=%0d", c3, m3, e);
      end
      if (x % 16 == 0) @(posedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 5; i++) c5[i] = W'($urandom);
      #1;
      e = int'(c5[0]);
      for (int i = 1; i < 5; i++) if (int'(c5[i]) < e) e = int'(c5[i]);
      checks++;
      if (int'(m5) != e) begin
        failures++;
        if (failures < 10) $display("FAIL NC=5 cand=%h min=%0d exp=%0d", c5, m5, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

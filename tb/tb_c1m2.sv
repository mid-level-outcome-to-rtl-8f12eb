// tb_c1m2: exhaustive self-checking test of the C1M2 unit at W = 6.
// Every pair (a, b) is applied; min, max and the comparison bit are
// compared with values computed here. The unit is combinational, so each
// result is checked in the same clock cycle its inputs are applied.
module tb_c1m2;
  localparam int W = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, mn, mx;
  logic         sel;
  int checks = 0, failures = 0;

  c1m2 dut (.a(a), .b(b), .min_o(mn), .max_o(mx), .sel_o(sel));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      for (int j = 0; j < 2**W; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (mn !== W'((j < i) ? j : i) || mx !== W'((j < i) ? i : j) ||
            sel !== (j < i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: min=%0d max=%0d sel=%0b", i, j, mn, mx, sel);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

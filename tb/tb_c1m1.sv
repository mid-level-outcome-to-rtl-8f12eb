// tb_c1m1: exhaustive self-checking test of the C1M1 unit at W = 6.
// Every pair (a, b) is applied and the minimum and comparison bit are
// compared with values computed here, in the same cycle (combinational).
module tb_c1m1;
  localparam int W = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, mn;
  logic         sel;
  int checks = 0, failures = 0;

  c1m1 dut (.a(a), .b(b), .min_o(mn), .sel_o(sel));

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
        if (mn !== W'((j < i) ? j : i) || sel !== (j < i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: min=%0d sel=%0b", i, j, mn, sel);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pro_unit: self-checking test of the PROk unit at K = 8 and K = 16.
// Random inputs are drawn from a small range so that ties are frequent,
// plus directed all-equal and all-maximum vectors. Expected values are
// computed here without a comparator tree:
//   MIN1       = smallest input (linear scan), at position p, the lowest
//                index holding it;
//   cand[l]    = smallest input of the block of 2^l inputs that is paired
//                with p's block at level l (inputs whose index agrees with
//                p above bit l and differs in bit l);
//   cmp bits   = for each tree node, whether the high block's minimum is
//                strictly below the low block's minimum.
module tb_pro_unit;
  localparam int W = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0][W-1:0]  din8;
  logic [W-1:0]       min8;
  logic [2:0][W-1:0]  cand8;
  logic [6:0]         cmp8;
  pro_unit dut8 (.din(din8), .min1_o(min8), .cand_o(cand8), .cmp_o(cmp8));

  logic [15:0][W-1:0] din16;
  logic [W-1:0]       min16;
  logic [3:0][W-1:0]  cand16;
  logic [14:0]        cmp16;
  pro_unit #(.K(16), .W(W)) dut16 (.din(din16), .min1_o(min16), .cand_o(cand16), .cmp_o(cmp16));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Minimum of v[lo .. lo+n-1].
  function automatic int block_min(int v[16], int lo, int n);
    int m = v[lo];
    for (int i = lo + 1; i < lo + n; i++) if (v[i] < m) m = v[i];
    return m;
  endfunction

  task automatic check_case(int k, int v[16]);
    int m, p, ofs, exp_c, got_c, got_min, got_cand, got_cmp;
    m = v[0];
    p = 0;
    for (int i = 1; i < k; i++) if (v[i] < m) begin m = v[i]; p = i; end
    got_min = (k == 8) ? int'(min8) : int'(min16);
    checks++;
    if (got_min != m) begin
      failures++;
      if (failures < 10) $display("FAIL K=%0d min1=%0d exp=%0d", k, got_min, m);
    end
    for (int l = 0; l < $clog2(k); l++) begin
      int sib = ((p >> l) ^ 1) << l;
      exp_c = block_min(v, sib, 1 << l);
      got_cand = (k == 8) ? int'(cand8[l]) : int'(cand16[l]);
      checks++;
      if (got_cand != exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d cand[%0d]=%0d exp=%0d", k, l, got_cand, exp_c);
      end
    end
    ofs = 0;
    for (int l = 0; l < $clog2(k); l++) begin
      int sz = 1 << l;
      for (int j = 0; j < (k >> (l + 1)); j++) begin
        int lo_m = block_min(v, 2 * j * sz, sz);
        int hi_m = block_min(v, (2 * j + 1) * sz, sz);
        got_cmp = (k == 8) ? int'(cmp8[ofs + j]) : int'(cmp16[ofs + j]);
        checks++;
        if (got_cmp != int'(hi_m < lo_m)) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d cmp level %0d node %0d", k, l, j);
        end
      end
      ofs += k >> (l + 1);
    end
  endtask

  task automatic apply(int v[16]);
    for (int i = 0; i < 8; i++) din8[i] = W'(v[i]);
    for (int i = 0; i < 16; i++) din16[i] = W'(v[i]);
    #1;
    check_case(8, v);
    check_case(16, v);
    @(posedge clk);
  endtask

  initial begin
    int v[16];
    for (int i = 0; i < 16; i++) v[i] = 5;
    apply(v);
    for (int i = 0; i < 16; i++) v[i] = 2**W - 1;
    apply(v);
    for (int i = 0; i < 16; i++) v[i] = 0;
    apply(v);
    for (int i = 0; i < 16; i++) v[i] = 15 - i;
    apply(v);
    for (int t = 0; t < 3000; t++) begin
      int range = (t % 2 == 0) ? 7 : 2**W - 1;
      for (int i = 0; i < 16; i++) v[i] = int'($urandom_range(0, range));
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

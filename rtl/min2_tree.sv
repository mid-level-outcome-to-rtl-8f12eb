// min2_tree: picks the second minimum out of the candidates of a PROk unit.
//
// The paper builds this from C1M1 units arranged as a tree: for eight
// inputs, two C1M1 units choose MIN2 among the three candidates of PRO8.
// For NC candidates this module uses NC-1 c1m1 units in a balanced tree of
// ceil(log2 NC) levels. At each level neighbouring values are paired, low
// index first, and an odd value left over passes straight to the next
// level. For three candidates that is min(min(cand[0], cand[1]), cand[2]).
// The pairing order is this design's choice.
//
// Interface: cand holds NC W-bit candidates, min_o is the smallest.
// Timing: purely combinational, ceil(log2 NC) comparator-plus-mux stages.
module min2_tree #(
  parameter int unsigned NC = $clog2(sm_pkg::DEFAULT_N),
  parameter int unsigned W  = sm_pkg::DEFAULT_W
) (
  input  logic [NC-1:0][W-1:0] cand,
  output logic [W-1:0]         min_o
);

  localparam int unsigned S = $clog2(NC);  // number of tree levels

  // Values entering tree level s (level 0 holds the candidates themselves).
  function automatic int unsigned count_at(int unsigned s);
    int unsigned n = NC;
    for (int unsigned i = 0; i < s; i++) n = (n + 1) / 2;
    return n;
  endfunction

  for (genvar s = 0; s <= S; s++) begin : g_lvl
    localparam int unsigned NI = count_at(s);
    logic [NI-1:0][W-1:0] vals;

    if (s == 0) begin : g_in
      assign vals = cand;
    end else begin : g_reduce
      localparam int unsigned NP = count_at(s - 1);  // values one level down
      for (genvar j = 0; j < NP / 2; j++) begin : g_pair
        logic unused_sel;
        c1m1 #(.W(W)) u_c1m1 (
          .a    (g_lvl[s-1].vals[2*j]),
          .b    (g_lvl[s-1].vals[2*j+1]),
          .min_o(vals[j]),
          .sel_o(unused_sel)
        );
      end
      if (NP % 2 == 1) begin : g_odd
        assign vals[NI-1] = g_lvl[s-1].vals[NP-1];
      end
    end
  end

  assign min_o = g_lvl[S].vals[0];

endmodule

// pro_unit: the PROk unit. Finds the minimum (MIN1) of K inputs and, at the
// same time, collects m = log2(K) candidates for the second minimum.
//
// How it works: a PRO2 unit is a single c1m2. A PROk unit is two PRO(k/2)
// units, one for the low half and one for the high half of the inputs,
// each returning its own minimum and m-1 candidates. A c1m2 compares the
// two half minima: the smaller becomes MIN1 and the larger becomes the
// newest candidate, because it lost only to MIN1. The true second minimum
// either is that loser or lost to MIN1 earlier inside the winning half, so
// m-1 2-to-1 multiplexors, steered by the same comparison, forward the
// winning half's candidates and drop the losing half's. A level costs one
// comparator and m+1 2-to-1 multiplexors (two of them inside the c1m2) and
// no wide k-to-1 multiplexor is needed. That structure follows the
// paper.
//
// The recursion is unrolled here level by level: node j of level l is the
// PRO(2^(l+1)) unit covering inputs j*2^(l+1) .. (j+1)*2^(l+1)-1, built from
// nodes 2j and 2j+1 of level l-1. The output ordering and the tie rule
// (the low half wins ties, so MIN1 is the lowest-indexed minimum) are this
// design's choices.
//
// Interface:
//   din    K inputs, din[0] is input 0 (the lowest index), W bits each.
//   min1_o the smallest input.
//   cand_o m candidates; cand_o[l] is the value that lost directly to the
//          final minimum at tree level l (level 0 = leaf comparators,
//          level m-1 = the root). cand_o[0] settles first, cand_o[m-1] last.
//   cmp_o  the K-1 comparison bits of the tree, level by level from the
//          leaves, low-index comparator first (see sm_pkg); a bit is 1 when
//          the high side was strictly smaller.
// Timing: purely combinational; log2(K) comparator-plus-mux stages.
// K must be a power of two, at least 2.
module pro_unit #(
  parameter int unsigned K = sm_pkg::DEFAULT_N,
  parameter int unsigned W = sm_pkg::DEFAULT_W
) (
  input  logic [K-1:0][W-1:0]         din,
  output logic [W-1:0]                min1_o,
  output logic [$clog2(K)-1:0][W-1:0] cand_o,
  output logic [K-2:0]                cmp_o
);

  localparam int unsigned M = $clog2(K);

  if (K < 2 || (K & (K - 1)) != 0) begin : g_bad_k
    $error("pro_unit: K must be a power of two and at least 2");
  end

  for (genvar l = 0; l < M; l++) begin : g_lvl
    localparam int unsigned NN = K >> (l + 1);  // PRO(2^(l+1)) nodes here

    logic [NN-1:0][W-1:0]      mins;   // minimum of each node
    logic [NN-1:0][l:0][W-1:0] cands;  // l+1 candidates of each node
    logic [NN-1:0]             sel;    // 1: the high half won

    for (genvar j = 0; j < NN; j++) begin : g_node
      logic [W-1:0] a, b, loser;

      if (l == 0) begin : g_leaf
        assign a = din[2*j];
        assign b = din[2*j+1];
      end else begin : g_inner
        assign a = g_lvl[l-1].mins[2*j];
        assign b = g_lvl[l-1].mins[2*j+1];
      end

      c1m2 #(.W(W)) u_c1m2 (
        .a    (a),
        .b    (b),
        .min_o(mins[j]),
        .max_o(loser),
        .sel_o(sel[j])
      );

      if (l == 0) begin : g_leaf_cand
        assign cands[j][0] = loser;
      end else begin : g_inner_cand
        // l multiplexors: keep the candidate set of the half that won.
        always_comb begin
          for (int unsigned c = 0; c < l; c++) begin
            cands[j][c] = sel[j] ? g_lvl[l-1].cands[2*j+1][c]
                                 : g_lvl[l-1].cands[2*j][c];
          end
          cands[j][l] = loser;
        end
      end
    end

    assign cmp_o[sm_pkg::cmp_level_offset(K, l) +: NN] = sel;
  end

  assign min1_o = g_lvl[M-1].mins[0];
  assign cand_o = g_lvl[M-1].cands[0];

endmodule

// idx_gen: generates IDX, the position of the first minimum, from the
// comparison bits of a K-input comparator tree.
//
// How it works: the root bit tells which half holds the minimum, so it is
// the most significant bit of IDX. That bit then selects, through a 2-to-1
// multiplexor, the comparison bit of the winning comparator one level
// down, which gives the next bit, and so on to the leaves. For eight
// inputs this is the four-multiplexor tree of the paper's index-generation
// figure: IDX[2] = c20, IDX[1] = c20 ? c11 : c10, and IDX[0] is chosen
// from c00..c03 by the two upper bits. The loop below writes that
// multiplexor tree for any power-of-two K.
//
// Interface: cmp is the flat comparison vector of pro_unit (level by level
// from the leaves, see sm_pkg), idx_o is the log2(K)-bit index of MIN1.
// Timing: purely combinational, log2(K) multiplexor levels after the root
// comparison has settled.
module idx_gen #(
  parameter int unsigned K = sm_pkg::DEFAULT_N
) (
  input  logic [K-2:0]           cmp,
  output logic [$clog2(K)-1:0]   idx_o
);

  localparam int unsigned M = $clog2(K);

  always_comb begin
    int unsigned pos;  // index of the winning comparator at the current level
    pos = 0;
    for (int l = M - 1; l >= 0; l--) begin
      idx_o[l] = cmp[sm_pkg::cmp_level_offset(K, l) + pos];
      pos      = 2 * pos + int'(idx_o[l]);
    end
  end

endmodule

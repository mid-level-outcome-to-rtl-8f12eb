// sm_pro: searching module that returns the two smallest of N values and
// the position of the smallest, as the check-node update of a min-sum
// LDPC decoder needs (MIN1 for every edge but one, MIN2 for that one).
//
// How it works: a PROk tree (pro_unit) finds MIN1 with K-1 comparators and,
// reusing those same comparisons, keeps the log2(K) values that lost
// directly to MIN1. The second minimum must be one of them, so a short
// tree of C1M1 units (min2_tree) selects MIN2 from these few candidates
// instead of from all N inputs, and the comparison bits of the tree give
// the index of MIN1 through a multiplexor tree (idx_gen). No N-to-1
// multiplexor is needed anywhere. This is the structure the paper
// proposes, shown there for eight inputs.
//
// When N is not a power of two, the tree is built for K = 2^ceil(log2 N)
// inputs and the unused high inputs are tied to the largest value; the
// comparators and multiplexors fed only by those constants then reduce
// away in synthesis, which amounts to pruning leaf nodes of the balanced
// tree as the paper suggests. Because ties go to the lower index, a
// padded input can never be reported as MIN1.
//
// Interface:
//   din    N unsigned W-bit magnitudes, din[0] is input 0.
//   min1_o smallest input; min2_o second smallest (equal to min1_o when
//          the minimum occurs twice); idx_o index of the lowest-indexed
//          input equal to min1_o.
// Timing: purely combinational; the path to min2_o is log2(K) comparator
// stages in PROk plus ceil(log2(log2 K)) in the C1M1 tree.
// N must be at least 2. The width W is this design's choice.
module sm_pro #(
  parameter int unsigned N = sm_pkg::DEFAULT_N,
  parameter int unsigned W = sm_pkg::DEFAULT_W
) (
  input  logic [N-1:0][W-1:0]         din,
  output logic [W-1:0]                min1_o,
  output logic [W-1:0]                min2_o,
  output logic [$clog2(N)-1:0]        idx_o
);

  localparam int unsigned M = $clog2(N);
  localparam int unsigned K = 1 << M;

  if (N < 2) begin : g_bad_n
    $error("sm_pro: N must be at least 2");
  end

  logic [K-1:0][W-1:0] din_pad;
  logic [M-1:0][W-1:0] cand;
  logic [K-2:0]        cmp;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      din_pad[i] = (i < N) ? din[i] : '1;
    end
  end

  pro_unit #(.K(K), .W(W)) u_pro (
    .din   (din_pad),
    .min1_o(min1_o),
    .cand_o(cand),
    .cmp_o (cmp)
  );

  min2_tree #(.NC(M), .W(W)) u_min2 (
    .cand (cand),
    .min_o(min2_o)
  );

  idx_gen #(.K(K)) u_idx (
    .cmp  (cmp),
    .idx_o(idx_o)
  );

endmodule

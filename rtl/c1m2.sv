// c1m2: one comparator and two w-bit 2-to-1 multiplexors (the "C1M2" unit).
//
// The comparator decides whether the right operand b is strictly smaller
// than the left operand a. Its result steers two multiplexors: one passes
// the smaller value, the other the larger one. On a tie the left operand is
// taken as the smaller, so a tree of these units always reports the
// lowest-index minimum; that tie rule is this design's choice.
//
// Interface: a, b are W-bit unsigned magnitudes; min_o and max_o are the
// smaller and the larger value; sel_o is 1 when b < a.
// Timing: purely combinational, one comparator delay plus one mux delay.
module c1m2 #(
  parameter int unsigned W = sm_pkg::DEFAULT_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] min_o,
  output logic [W-1:0] max_o,
  output logic         sel_o
);

  always_comb begin
    sel_o = (b < a);
    min_o = sel_o ? b : a;
    max_o = sel_o ? a : b;
  end

endmodule

// c1m1: one comparator and one w-bit 2-to-1 multiplexor (the "C1M1" unit).
//
// Passes the smaller of its two operands. It is the cheaper cousin of
// c1m2, used where the larger value is not needed, as in the tree that
// picks the second minimum out of the candidates. Ties pass operand a,
// which is this design's choice.
//
// Interface: a, b are W-bit unsigned magnitudes; min_o is the smaller
// value; sel_o is 1 when b < a.
// Timing: purely combinational, one comparator delay plus one mux delay.
module c1m1 #(
  parameter int unsigned W = sm_pkg::DEFAULT_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] min_o,
  output logic         sel_o
);

  always_comb begin
    sel_o = (b < a);
    min_o = sel_o ? b : a;
  end

endmodule

// endpoint_mux: 2:1 multiplexer that forwards a plateau end point of the
// stronger consequent.
//
// Driven by the comparator's T1, it passes a (the end point of C1) when
// sel = 0 and b (the end point of C2) when sel = 1. The defuzzifier uses two of
// them: one for the left end points (C1X1/C2X1 -> CX1) and one for the right
// end points (C1X2/C2X2 -> CX2).
//
// Interface: sel, a, b (W bits) in, y (W bits) out. Combinational.
module endpoint_mux #(
  parameter int unsigned W = mmp_pkg::DATA_W
) (
  input  logic         sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = sel ? b : a;
endmodule

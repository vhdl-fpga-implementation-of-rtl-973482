// endpoint_adder: adds the two selected plateau end points, R3 = CX1 + CX2.
//
// Unsigned W-bit adder whose carry out is dropped (the sum is modulo 2^W).
// The defuzzifier feeds it end points narrower than W, so in that use the sum
// never wraps; dropping the carry is this design's choice.
//
// Interface: a, b (W bits) in, sum (W bits) out. Combinational.
module endpoint_adder #(
  parameter int unsigned W = mmp_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  always_comb sum = a + b;
endmodule

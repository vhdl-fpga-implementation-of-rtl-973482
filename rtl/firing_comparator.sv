// firing_comparator: decides which rule consequent holds the maximum membership.
//
// The two fired rules truncate their consequents C1 and C2 at the firing
// strengths F1 and F2. The union of the two truncated sets reaches its maximum
// on the plateau of the consequent with the larger strength, so the comparator
// outputs T1 = 0 when F1 > F2 (take C1) and T1 = 1 when F1 < F2 (take C2), as
// the MMP procedure prescribes. The procedure leaves the tie F1 = F2 open; this
// design then keeps C1 (T1 = 0). Strengths are compared as unsigned codes.
//
// Interface: f1, f2 (W bits) in, t1 out. Purely combinational, no latency.
module firing_comparator #(
  parameter int unsigned W = mmp_pkg::FIRE_W
) (
  input  logic [W-1:0] f1,
  input  logic [W-1:0] f2,
  output logic         t1
);
  always_comb t1 = (f1 < f2);
endmodule

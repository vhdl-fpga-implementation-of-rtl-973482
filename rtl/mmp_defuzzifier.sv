// mmp_defuzzifier: max-membership-principle defuzzifier for a two-rule
// Mamdani fuzzy system.
//
// Each fired rule truncates its consequent (C1, C2) at its firing strength
// (F1, F2). The union of the truncated sets is maximal on the flat top of the
// stronger consequent, and the crisp output is the middle of that flat top:
//
//   T1  = (F1 < F2)                       firing_comparator
//   CX1 = T1 ? C2X1 : C1X1                endpoint_mux (left end)
//   CX2 = T1 ? C2X2 : C1X2                endpoint_mux (right end)
//   R3  = CX1 + CX2                       endpoint_adder
//   O   = R3 / NUM2, NUM2 = 2             constant_divider
//
// Example: F1 = 14H (1.0), F2 = 0AH (0.5), C1 plateau 0..8, C2 plateau 4..CH
// gives T1 = 0, CX1 = 0, CX2 = 8, R3 = 8, O = 4.
//
// The chain of blocks and the signal names follow the published architecture.
// The whole unit is combinational: O follows the inputs after the
// comparator, multiplexer, adder and shift delays, with no clock, reset or
// handshake. The fuzzifier and the rule evaluation that produce F1, F2 and the
// plateau end points are outside this unit; their results arrive on the input
// ports. Left end points are expected to be <= right end points of the same
// consequent; the unit does not check it. End points are zero-extended from
// Z_W to D_W bits before the multiplexers; Z_W < D_W is required so that R3
// cannot overflow. T1, CX1, CX2 and R3 are internal signals under those names,
// visible in simulation; only the crisp value O leaves the unit. With the
// default widths O never exceeds 0FH, so its upper four bits are always zero;
// they are kept so that O has the datapath width.
module mmp_defuzzifier #(
  parameter int unsigned F_W  = mmp_pkg::FIRE_W,
  parameter int unsigned Z_W  = mmp_pkg::ZPT_W,
  parameter int unsigned D_W  = mmp_pkg::DATA_W,
  parameter int unsigned NUM2 = mmp_pkg::DIVISOR
) (
  input  logic [F_W-1:0] f1,
  input  logic [F_W-1:0] f2,
  input  logic [Z_W-1:0] c1x1,
  input  logic [Z_W-1:0] c1x2,
  input  logic [Z_W-1:0] c2x1,
  input  logic [Z_W-1:0] c2x2,
  output logic [D_W-1:0] o
);
  logic           t1;   // 0: C1 holds the maximum, 1: C2 does
  logic [D_W-1:0] cx1;  // selected left end point
  logic [D_W-1:0] cx2;  // selected right end point
  logic [D_W-1:0] r3;   // CX1 + CX2

  if (Z_W >= D_W) begin : g_bad_width
    $error("mmp_defuzzifier: Z_W must be smaller than D_W");
  end

  firing_comparator #(.W(F_W)) u_cmp (
    .f1 (f1),
    .f2 (f2),
    .t1 (t1)
  );

  endpoint_mux #(.W(D_W)) u_mux_x1 (
    .sel (t1),
    .a   (D_W'(c1x1)),
    .b   (D_W'(c2x1)),
    .y   (cx1)
  );

  endpoint_mux #(.W(D_W)) u_mux_x2 (
    .sel (t1),
    .a   (D_W'(c1x2)),
    .b   (D_W'(c2x2)),
    .y   (cx2)
  );

  endpoint_adder #(.W(D_W)) u_add (
    .a   (cx1),
    .b   (cx2),
    .sum (r3)
  );

  constant_divider #(.W(D_W), .NUM2(NUM2)) u_div (
    .dividend (r3),
    .quotient (o)
  );
endmodule

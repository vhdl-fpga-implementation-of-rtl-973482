// constant_divider: divides the plateau sum R3 by the constant NUM2, giving the
// crisp output O = R3 / NUM2.
//
// With the default NUM2 = 2 the result is the midpoint of the maximum plateau
// and synthesis reduces the divide to a one-bit right shift. The quotient is
// truncated toward zero (floor for these unsigned values); rounding is not
// specified for this step and truncation is this design's choice. NUM2 is a
// constant parameter, not a port, because it never changes in operation.
//
// Interface: dividend (W bits) in, quotient (W bits) out. Combinational.
module constant_divider #(
  parameter int unsigned W    = mmp_pkg::DATA_W,
  parameter int unsigned NUM2 = mmp_pkg::DIVISOR
) (
  input  logic [W-1:0] dividend,
  output logic [W-1:0] quotient
);
  localparam logic [W-1:0] DIVISOR = W'(NUM2);

  if (NUM2 == 0) begin : g_bad_divisor
    $error("constant_divider: NUM2 must be non-zero");
  end

  always_comb quotient = dividend / DIVISOR;
endmodule

// mmp_pkg: widths and constants shared by the max-membership-principle (MMP)
// defuzzifier and its testbenches.
//
// Firing strengths are unsigned codes in which 14H stands for membership 1.0
// (so 0AH = 0.5 and 05H = 0.25), held in FIRE_W = 8 bits. Points of the output
// universe (the plateau end points C1X1..C2X2) are ZPT_W = 4 bit codes. The
// datapath behind the multiplexers (CX1, CX2, R3, O) is DATA_W = 8 bits wide.
// These widths follow the published timing diagram, which shows firing
// strengths and datapath values with two hex digits and end points with one.
// DIVISOR is the constant NUM2 = 2 that turns the plateau sum into its midpoint.
package mmp_pkg;
  localparam int unsigned FIRE_W  = 8;
  localparam int unsigned ZPT_W   = 4;
  localparam int unsigned DATA_W  = 8;
  localparam int unsigned DIVISOR = 2;
  // Membership code for 1.0
  localparam logic [FIRE_W-1:0] MU_ONE = 8'h14;
endpackage

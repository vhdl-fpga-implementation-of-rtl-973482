// tb_mmp_defuzzifier: end-to-end self-check of the max-membership defuzzifier
// at its default sizes (8-bit strengths, 4-bit end points, 8-bit datapath,
// NUM2 = 2).
//
// Phase 1 applies the three reference models and checks the crisp output O
// (the intermediate values are listed for reference; the block testbenches
// check T1, CX and R3 directly):
//   model 1: F1=14H F2=0AH C1=[0,8] C2=[4,C]  -> T1=0 CX1=0 CX2=8 R3=08H O=4
//   model 2: F1=05H F2=14H C1=[0,8] C2=[6,E]  -> T1=1 CX1=6 CX2=E R3=14H O=0AH
//   model 3: F1=0FH F2=05H C1=[1,9] C2=[7,C]  -> T1=0 CX1=1 CX2=9 R3=0AH O=5
// Phase 2 applies random strengths and plateaus. The reference builds the
// union of the two truncated consequents point by point over the 16-point
// universe, finds the set of points where it is maximal (on a tie of the
// strengths only C1's plateau counts, which is the design's rule) and returns
// the midpoint of the first and last maximising points.
// Each selection case (C1 wins, C2 wins, tie) is counted; a case that never
// occurs counts as a failure. The output is combinational, so it is checked
// 1 time unit after the inputs change (zero clock cycles of latency).
module tb_mmp_defuzzifier;
  import mmp_pkg::*;

  logic [FIRE_W-1:0] f1, f2;
  logic [ZPT_W-1:0]  c1x1, c1x2, c2x1, c2x2;
  logic [DATA_W-1:0] o;

  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_tie = 0;
  logic clk = 1'b0;
  int   cycles = 0;

  mmp_defuzzifier dut (
    .f1(f1), .f2(f2),
    .c1x1(c1x1), .c1x2(c1x2), .c2x1(c2x1), .c2x2(c2x2),
    .o(o)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles == 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0h expected %0h (f1=%h f2=%h C1=[%h,%h] C2=[%h,%h])",
                 what, got, exp, f1, f2, c1x1, c1x2, c2x1, c2x2);
    end
  endtask

  task automatic apply(input int a, input int b,
                       input int p1, input int q1, input int p2, input int q2);
    f1 = FIRE_W'(a); f2 = FIRE_W'(b);
    c1x1 = ZPT_W'(p1); c1x2 = ZPT_W'(q1); c2x1 = ZPT_W'(p2); c2x2 = ZPT_W'(q2);
    #1;
  endtask

  // Midpoint of the maximising set of the union of the truncated consequents
  function automatic int ref_crisp(input int a, input int b,
                                   input int p1, input int q1, input int p2, input int q2);
    int mu [16];
    int best, first, last;
    best = -1; first = -1; last = -1;
    for (int z = 0; z < 16; z++) begin
      int m1, m2;
      // Membership on each flat top is its firing strength; elsewhere it is
      // below the flat top, modelled as -1 here
      m1 = (z >= p1 && z <= q1) ? a : -1;
      m2 = (z >= p2 && z <= q2) ? b : -1;
      if (a == b) m2 = -1;  // tie: C1 is kept
      mu[z] = (m1 > m2) ? m1 : m2;
      if (mu[z] > best) best = mu[z];
    end
    for (int z = 0; z < 16; z++)
      if (mu[z] == best) begin
        if (first < 0) first = z;
        last = z;
      end
    return (first + last) / 2;
  endfunction

  task automatic run_case(input int a, input int b,
                          input int p1, input int q1, input int p2, input int q2);
    int exp_o;
    apply(a, b, p1, q1, p2, q2);
    exp_o = ref_crisp(a, b, p1, q1, p2, q2);
    expect_eq("O", int'(o), exp_o);
    if (a > b)      n_c1++;
    else if (a < b) n_c2++;
    else            n_tie++;
  endtask

  initial begin
    // Model 1
    apply('h14, 'h0A, 0, 8, 4, 'hC);
    expect_eq("M1 O", int'(o), 'h04);
    n_c1++;
    // Model 2
    apply('h05, 'h14, 0, 8, 6, 'hE);
    expect_eq("M2 O", int'(o), 'h0A);
    n_c2++;
    // Model 3
    apply('h0F, 'h05, 1, 9, 7, 'hC);
    expect_eq("M3 O", int'(o), 'h05);
    n_c1++;

    // Random models: plateaus ordered left <= right, strengths 0..1.0 (14H)
    repeat (20000) begin
      int a, b, p1, q1, p2, q2, t;
      a  = $urandom_range(0, int'(MU_ONE));
      b  = ($urandom_range(0, 7) == 0) ? a : $urandom_range(0, int'(MU_ONE));
      p1 = $urandom_range(0, 15); q1 = $urandom_range(0, 15);
      p2 = $urandom_range(0, 15); q2 = $urandom_range(0, 15);
      if (p1 > q1) begin t = p1; p1 = q1; q1 = t; end
      if (p2 > q2) begin t = p2; p2 = q2; q2 = t; end
      run_case(a, b, p1, q1, p2, q2);
    end

    $display("selections: C1=%0d C2=%0d tie=%0d", n_c1, n_c2, n_tie);
    checks++; if (n_c1 == 0)  begin failures++; $display("FAIL C1 never selected"); end
    checks++; if (n_c2 == 0)  begin failures++; $display("FAIL C2 never selected"); end
    checks++; if (n_tie == 0) begin failures++; $display("FAIL tie never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

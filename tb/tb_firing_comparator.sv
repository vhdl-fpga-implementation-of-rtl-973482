// tb_firing_comparator: exhaustive self-check of the firing-strength comparator.
//
// Every pair (f1, f2) of 8-bit codes is applied; the expected T1 is 1 exactly
// when f2 is the larger strength and 0 otherwise (ties keep C1). The worked
// examples F1 = 14H / F2 = 0AH (T1 = 0) and F1 = 05H / F2 = 14H (T1 = 1) are
// among them. A watchdog clock ends the run with a failure if it hangs.
module tb_firing_comparator;
  localparam int unsigned W = 8;
  logic [W-1:0] f1, f2;
  logic         t1;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int   cycles = 0;

  firing_comparator #(.W(W)) dut (.f1(f1), .f2(f2), .t1(t1));

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

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b);
    logic exp_t1;
    f1 = a; f2 = b;
    #1;
    // Larger strength wins; compare as integers
    exp_t1 = (int'(b) - int'(a)) > 0;
    checks++;
    if (t1 !== exp_t1) begin
      failures++;
      if (failures < 10) $display("FAIL f1=%h f2=%h t1=%b exp=%b", a, b, t1, exp_t1);
    end
  endtask

  initial begin
    check(8'h14, 8'h0A);
    check(8'h05, 8'h14);
    check(8'h0F, 8'h05);
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        check(W'(a), W'(b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

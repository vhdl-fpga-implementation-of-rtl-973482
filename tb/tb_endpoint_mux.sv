// tb_endpoint_mux: self-check of the T1-controlled end-point multiplexer.
//
// Applies all 4-bit end-point pairs with both select values plus random 8-bit
// operands, and expects the C1 operand for sel = 0 and the C2 operand for
// sel = 1. A watchdog clock ends the run with a failure if it hangs.
module tb_endpoint_mux;
  localparam int unsigned W = 8;
  logic         sel;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int   cycles = 0;

  endpoint_mux #(.W(W)) dut (.sel(sel), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles == 100000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic s, input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W-1:0] exp_y;
    sel = s; a = va; b = vb;
    #1;
    exp_y = (s == 1'b0) ? va : vb;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%b a=%h b=%h y=%h exp=%h", s, va, vb, y, exp_y);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          check(1'(s), W'(i), W'(j));
    repeat (2000) check(1'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

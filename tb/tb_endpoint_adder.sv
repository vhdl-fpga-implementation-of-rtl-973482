// tb_endpoint_adder: exhaustive self-check of the plateau-sum adder.
//
// Every pair of 8-bit operands is applied and the sum is compared with the
// integer sum taken modulo 256. Includes the worked sums 0 + 8 = 8H,
// 6 + EH = 14H and 1 + 9 = 0AH. A watchdog clock ends a hung run.
module tb_endpoint_adder;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int   cycles = 0;

  endpoint_adder #(.W(W)) dut (.a(a), .b(b), .sum(sum));

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

  task automatic check(input int va, input int vb);
    int exp_sum;
    a = W'(va); b = W'(vb);
    #1;
    exp_sum = (va + vb) % 256;
    checks++;
    if (int'(sum) != exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d sum=%0d exp=%0d", va, vb, sum, exp_sum);
    end
  endtask

  initial begin
    check(0, 8); check(6, 14); check(1, 9);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(i, j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_constant_divider: exhaustive self-check of the divide-by-NUM2 stage.
//
// The default instance (NUM2 = 2) gets every 8-bit dividend; a second
// instance with NUM2 = 3 checks that the divisor parameter is honoured. The
// expected quotient is found by repeated subtraction, independently of the
// divide operator. Includes the worked outputs 8H -> 4, 14H -> 0AH, 0AH -> 5.
module tb_constant_divider;
  localparam int unsigned W = 8;
  logic [W-1:0] d, q2, q3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int   cycles = 0;

  constant_divider dut2 (.dividend(d), .quotient(q2));
  constant_divider #(.W(W), .NUM2(3)) dut3 (.dividend(d), .quotient(q3));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles == 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int slow_div(input int n, input int m);
    int q = 0;
    while (n >= m) begin
      n -= m;
      q++;
    end
    return q;
  endfunction

  task automatic check(input int v);
    d = W'(v);
    #1;
    checks += 2;
    if (int'(q2) != slow_div(v, 2)) begin
      failures++;
      if (failures < 10) $display("FAIL /2 d=%0d q=%0d", v, q2);
    end
    if (int'(q3) != slow_div(v, 3)) begin
      failures++;
      if (failures < 10) $display("FAIL /3 d=%0d q=%0d", v, q3);
    end
  endtask

  initial begin
    check(8'h08); check(8'h14); check(8'h0A);
    for (int i = 0; i < 256; i++) check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

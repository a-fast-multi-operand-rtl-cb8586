// tb_multiple_multiplier: checks the (2, 2, 4; 8) multiple multiplier at every
// one of its 256 operand combinations, and a (1, 3, 4; 8) instance as well, so
// that the operand field boundaries are exercised at more than one split. The
// reference is the ordinary product of the three fields. One combination per
// clock; a watchdog ends the run if it stalls.
module tb_multiple_multiplier;

  logic       clk = 1'b0;
  logic [7:0] ops_224, prod_224;
  logic [7:0] ops_134, prod_134;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  multiple_multiplier                             dut_224 (.operands(ops_224), .product(prod_224));
  multiple_multiplier #(.P1(1), .P2(3), .P3(4))   dut_134 (.operands(ops_134), .product(prod_134));

  initial begin
    int unsigned x1, x2, x3, exp224, exp134;
    for (int unsigned a = 0; a < 256; a++) begin
      ops_224 = 8'(a);
      ops_134 = 8'(a);
      @(posedge clk);
      x1 = a % 4; x2 = (a / 4) % 4; x3 = a / 16;
      exp224 = x1 * x2 * x3;
      checks++;
      if (prod_224 !== 8'(exp224) || exp224 > 255) begin
        failures++;
        $display("FAIL (2,2,4;8) %0d*%0d*%0d = %0d, got %0d", x1, x2, x3, exp224, prod_224);
      end
      x1 = a % 2; x2 = (a / 2) % 8; x3 = a / 16;
      exp134 = x1 * x2 * x3;
      checks++;
      if (prod_134 !== 8'(exp134)) begin
        failures++;
        $display("FAIL (1,3,4;8) %0d*%0d*%0d = %0d, got %0d", x1, x2, x3, exp134, prod_134);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

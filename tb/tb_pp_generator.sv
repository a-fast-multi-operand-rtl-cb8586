// tb_pp_generator: applies all 4096 operand triples to the multiplier array
// and checks each of the four partial products against the product of the
// matching operand halves, and that the weighted matrix A + 4B + 4C + 16D
// equals op1*op2*op3. It also checks the matrix size: 4 devices x 8 bits = 32
// partial-product bits, against n^d = 64 for an AND array. One triple per
// clock; a watchdog ends the run if it stalls.
module tb_pp_generator;
  import momul_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] op1, op2, op3;
  matrix1_t   pp;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  pp_generator dut (.op1(op1), .op2(op2), .op3(op3), .pp(pp));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%0d,%0d,%0d got %0d expected %0d", what, op1, op2, op3, got, exp);
    end
  endtask

  initial begin
    int l1, h1, l2, h2, m3;
    expect_eq("matrix bits", $bits(pp), 32);
    for (int unsigned t = 0; t < 4096; t++) begin
      {op3, op2, op1} = 12'(t);
      @(posedge clk);
      l1 = op1 % 4; h1 = op1 / 4; l2 = op2 % 4; h2 = op2 / 4; m3 = int'(op3);
      expect_eq("A", int'(pp[0]), l1 * l2 * m3);
      expect_eq("B", int'(pp[1]), h1 * l2 * m3);
      expect_eq("C", int'(pp[2]), l1 * h2 * m3);
      expect_eq("D", int'(pp[3]), h1 * h2 * m3);
      expect_eq("sum", int'(pp[0]) + 4 * int'(pp[1]) + 4 * int'(pp[2]) + 16 * int'(pp[3]),
                int'(op1) * int'(op2) * int'(op3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

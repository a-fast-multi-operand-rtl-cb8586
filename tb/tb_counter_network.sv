// tb_counter_network: the counter network must return the weighted sum of its
// 32 input bits, A + 4B + 4C + 16D, modulo 2^12, for any input matrix (every
// bit it drops weighs 2^12 or more). The test drives 20000 random matrices
// plus the all-ones and all-zeros matrices and every single-bit matrix, one
// per clock. A watchdog ends the run if it stalls.
module tb_counter_network;
  import momul_pkg::*;

  logic        clk = 1'b0;
  matrix1_t    pp;
  logic [11:0] product;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  counter_network dut (.pp(pp), .product(product));

  task automatic apply(matrix1_t m);
    int exp;
    pp = m;
    @(posedge clk);
    exp = (int'(m[0]) + 4 * int'(m[1]) + 4 * int'(m[2]) + 16 * int'(m[3])) % 4096;
    checks++;
    if (int'(product) != exp) begin
      failures++;
      $display("FAIL pp=%h got %0d expected %0d", m, product, exp);
    end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 32; i++) apply(matrix1_t'(32'd1 << i));
    for (int n = 0; n < 20000; n++) apply(matrix1_t'($urandom));
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

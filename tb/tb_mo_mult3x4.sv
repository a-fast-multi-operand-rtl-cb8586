// tb_mo_mult3x4: end-to-end test of the three-operand multiplier at its only
// size. All 4096 operand triples are applied, one per clock, and the 12-bit
// product is compared with op1*op2*op3 computed here. Besides the products,
// the test counts how often each mechanism of the design was exercised and
// fails if one never was:
//   - the stage-1 bypass bit (a weight-8 bit of multiplier D that skips the
//     first counter stage) being 1;
//   - the top output bit of each counter E..K being 1, i.e. every counter
//     used over its full output range;
//   - product bits that leave early (bits 0-1 after the multipliers, 2-3
//     after stage 1, 4-6 after stage 2) being 1;
//   - the largest product, 15^3 = 3375, which needs all 12 bits.
// The mechanisms are observed through a reference model of the counter stages
// built from the pin lists, which also shows that the bits H, J and K do not
// output (weights 2^12 and up) are never needed: the weighted input sum of
// each of them stays within its outputs. A watchdog ends the run if it stalls.
module tb_mo_mult3x4;

  logic        clk = 1'b0;
  logic [3:0]  op1, op2, op3;
  logic [11:0] product;
  int          checks = 0, failures = 0;

  int n_bypass = 0, n_early = 0, n_max = 0;
  int n_top [7];  // E F G H I J K
  int max_h = 0, max_j = 0, max_k = 0;

  always #5 clk = ~clk;

  mo_mult3x4 dut (.op1(op1), .op2(op2), .op3(op3), .product(product));

  // Reference model of the counter network, written from the pin lists
  // (absolute bit weights) rather than from the RTL: each counter's value is
  // the weighted sum of its input bits in units of its lowest output bit.
  int m [4];           // partial products A, B, C, D
  int e, f, g, h, i_, j, k, bypass;

  function automatic int pbit(int dev, int w);  // Matrix-1 bit of weight w of a device
    int sh [4] = '{0, 2, 2, 4};
    return (m[dev] >> (w - sh[dev])) & 1;
  endfunction

  function automatic int obit(int v, int base, int w);  // output bit of weight w
    return (v >> (w - base)) & 1;
  endfunction

  task automatic run_model();
    int l1, h1, l2, h2;
    l1 = op1 % 4; h1 = op1 / 4; l2 = op2 % 4; h2 = op2 / 4;
    m[0] = l1 * l2 * op3; m[1] = h1 * l2 * op3; m[2] = l1 * h2 * op3; m[3] = h1 * h2 * op3;
    // stage 1
    e = pbit(0,2) + 2*pbit(0,3) + 4*pbit(0,4) + pbit(1,2) + 2*pbit(1,3) + 4*pbit(1,4)
      + pbit(2,2) + 2*pbit(2,3);
    f = 2*pbit(0,5) + 4*pbit(0,6) + 2*pbit(1,5) + 4*pbit(1,6) + pbit(2,4) + 2*pbit(2,5)
      + pbit(3,4) + 2*pbit(3,5);
    g = 2*pbit(0,7) + 2*pbit(1,7) + 4*pbit(1,8) + pbit(2,6) + 2*pbit(2,7) + 4*pbit(2,8)
      + pbit(3,6) + 2*pbit(3,7);
    h = pbit(1,9) + pbit(2,9) + pbit(3,9) + 2*pbit(3,10) + 4*pbit(3,11);
    bypass = pbit(3,8);
    // stage 2
    i_ = obit(e,2,4) + 2*obit(e,2,5) + 4*obit(e,2,6) + obit(f,4,4) + 2*obit(f,4,5)
       + 4*obit(f,4,6) + 8*obit(f,4,7) + 4*obit(g,6,6);
    j = obit(f,4,8) + obit(g,6,8) + 2*obit(g,6,9) + 4*obit(g,6,10) + bypass
      + 2*obit(h,9,9) + 4*obit(h,9,10) + 8*obit(h,9,11);
    // stage 3
    k = obit(i_,4,7) + 2*obit(i_,4,8) + obit(g,6,7) + 2*obit(j,8,8) + 4*obit(j,8,9)
      + 8*obit(j,8,10) + 16*obit(j,8,11);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%0d,%0d,%0d product=%0d", what, op1, op2, op3, product);
    end
  endtask

  initial begin
    int exp;
    foreach (n_top[i]) n_top[i] = 0;
    for (int unsigned t = 0; t < 4096; t++) begin
      {op3, op2, op1} = 12'(t);
      @(posedge clk);
      exp = int'(op1) * int'(op2) * int'(op3);
      check(int'(product) == exp, "product");
      run_model();
      check(int'(product) == (k * 128 + (i_ % 8) * 16 + (e % 4) * 4 + (m[0] % 4)),
            "product equals the staged sum");
      check(h < 8,  "H sum within 3 bits");
      check(j < 16, "J sum within 4 bits");
      check(k < 32, "K sum within 5 bits");
      if (h > max_h) max_h = h;
      if (j > max_j) max_j = j;
      if (k > max_k) max_k = k;
      if (bypass != 0) n_bypass++;
      if (e >= 16) n_top[0]++;
      if (f >= 16) n_top[1]++;
      if (g >= 16) n_top[2]++;
      if (h >= 4)  n_top[3]++;
      if (i_ >= 16) n_top[4]++;
      if (j >= 8)  n_top[5]++;
      if (k >= 16) n_top[6]++;
      if (product[1:0] != 0 && product[3:2] != 0 && product[6:4] != 0) n_early++;
      if (exp == 3375) n_max++;
    end
    $display("bypass bit set: %0d, early product bits: %0d, full-scale products: %0d",
             n_bypass, n_early, n_max);
    $display("top counter output set: E %0d F %0d G %0d H %0d I %0d J %0d K %0d",
             n_top[0], n_top[1], n_top[2], n_top[3], n_top[4], n_top[5], n_top[6]);
    $display("largest counter sums: H %0d (of 7) J %0d (of 15) K %0d (of 31)", max_h, max_j, max_k);
    check(n_bypass > 0, "bypass bit exercised");
    check(n_early > 0, "early product bits exercised");
    check(n_max > 0, "full-scale product exercised");
    foreach (n_top[i]) check(n_top[i] > 0, $sformatf("counter %0d top bit exercised", i));
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

// multiple_multiplier: a (p1, p2, p3; q) multiple multiplier, i.e. one ROM
// that multiplies three operands at once.
//
// The ROM's q address lines are split into three fields, operand 1 in the
// lowest P1 bits, operand 2 in the next P2 bits and operand 3 in the top P3
// bits, and the word stored at each address is the product of the three
// fields. The product length q equals the total operand length P1+P2+P3, so
// no product can overflow it. With the default (2, 2, 4; 8) this is exactly
// one 256 x 8 ROM. The device is combinational, one ROM delay from operands to
// product.
//
// The (p; q) notation, the default sizes and the table-lookup principle follow
// the described design; the order of the operand fields on the address lines
// is this implementation's reading of the pin numbers of device A.
module multiple_multiplier #(
  parameter int unsigned P1 = 2,
  parameter int unsigned P2 = 2,
  parameter int unsigned P3 = 4,
  localparam int unsigned Q = P1 + P2 + P3
) (
  input  logic [Q-1:0] operands,  // {operand 3, operand 2, operand 1}
  output logic [Q-1:0] product
);

  function automatic logic [(2**Q)*Q-1:0] product_image();
    logic [(2**Q)*Q-1:0] img;
    longint unsigned x1, x2, x3;
    longint unsigned av;
    img = '0;
    for (int unsigned a = 0; a < (32'd1 << Q); a++) begin
      av = longint'(a);
      x1 = av & ((64'd1 << P1) - 1);
      x2 = (av >> P1) & ((64'd1 << P2) - 1);
      x3 = (av >> (P1 + P2)) & ((64'd1 << P3) - 1);
      img[a*Q +: Q] = Q'(x1 * x2 * x3);
    end
    return img;
  endfunction

  rom256x8 #(
    .ADDR_W  (Q),
    .DATA_W  (Q),
    .CONTENTS(product_image())
  ) u_rom (
    .addr(operands),
    .data(product)
  );

endmodule

// pp_generator: the multiplier array that turns three 4-bit operands into the
// 32-bit partial-product matrix ("Matrix 1").
//
// Operands 1 and 2 are each cut into a low and a high 2-bit half; operand 3 is
// used whole. Each of the four pairings of halves drives one (2, 2, 4; 8)
// multiple multiplier:
//   A = op1[1:0] * op2[1:0] * op3   weight of bit 0: 2^0
//   B = op1[3:2] * op2[1:0] * op3   weight of bit 0: 2^2
//   C = op1[1:0] * op2[3:2] * op3   weight of bit 0: 2^2
//   D = op1[3:2] * op2[3:2] * op3   weight of bit 0: 2^4
// so op1*op2*op3 = A + 4B + 4C + 16D. A plain d-input AND array would need
// n^d = 64 partial-product bits; this array makes 32. Combinational, one ROM
// delay.
//
// The split into sub-operands, the four devices and their output weights
// follow the described design. Which of B and C takes the high half of
// operand 1 is this implementation's choice; the sum is the same either way.
module pp_generator
  import momul_pkg::*;
(
  input  logic [N_BITS-1:0] op1,
  input  logic [N_BITS-1:0] op2,
  input  logic [N_BITS-1:0] op3,
  output matrix1_t          pp
);

  multiple_multiplier u_mul_a (.operands({op3, op2[1:0], op1[1:0]}), .product(pp[MUL_A]));
  multiple_multiplier u_mul_b (.operands({op3, op2[1:0], op1[3:2]}), .product(pp[MUL_B]));
  multiple_multiplier u_mul_c (.operands({op3, op2[3:2], op1[1:0]}), .product(pp[MUL_C]));
  multiple_multiplier u_mul_d (.operands({op3, op2[3:2], op1[3:2]}), .product(pp[MUL_D]));

endmodule

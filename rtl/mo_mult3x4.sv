// mo_mult3x4: three-operand, 4-bit multiplier of the generation-summation
// type, built from eleven identical 256 x 8 ROMs.
//
// product = op1 * op2 * op3, unsigned, 12 bits. Instead of two multipliers in
// cascade, whose delay grows linearly with the number of operands, all three
// operands enter one multiplier array (four ROMs programmed as (2, 2, 4; 8)
// multiple multipliers, A-D) that forms a 32-bit partial-product matrix in one
// step, and a network of seven ROMs programmed as generalized counters (E-K)
// reduces the matrix to the product in three further steps. The path is four
// ROM delays long: A-D, then E-H, then I-J, then K. There is no clock; the
// product is valid four ROM access times after the operands settle.
//
// The structure, device count and product width follow the described design;
// unsigned operands and the purely combinational interface are this
// implementation's reading of it.
module mo_mult3x4
  import momul_pkg::*;
(
  input  logic [N_BITS-1:0] op1,
  input  logic [N_BITS-1:0] op2,
  input  logic [N_BITS-1:0] op3,
  output logic [PROD_W-1:0] product
);

  matrix1_t pp;

  pp_generator u_pp_gen (
    .op1(op1),
    .op2(op2),
    .op3(op3),
    .pp (pp)
  );

  counter_network u_cnt_net (
    .pp     (pp),
    .product(product)
  );

endmodule

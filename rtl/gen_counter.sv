// gen_counter: a generalized parallel counter made of one 256 x 8 ROM.
//
// Each of the eight address lines x[i] is a bit of the partial-product matrix
// with weight 2^WEIGHTS[i] relative to the counter's lowest output bit. The
// ROM word at each address is the weighted sum of the set bits, so `s` is that
// sum in binary. A counter whose inputs add up to at most S needs
// floor(log2 S) + 1 outputs; OUT_W may be set lower where the bits above it
// would weigh more than the final product can reach, and the sum is then kept
// modulo 2^OUT_W. Unused inputs must be tied to 0 by the instantiating block.
// Combinational, one ROM delay.
//
// The counter principle and the output count follow the described design; the
// weight table is read from the bit numbers printed at each counter's pins.
// The ROM word bits above OUT_W are programmed to zero and left unconnected.
module gen_counter
  import momul_pkg::*;
#(
  parameter weights_t    WEIGHTS = '0,
  parameter int unsigned OUT_W   = 5
) (
  input  logic [ROM_AW-1:0] x,
  output logic [OUT_W-1:0]  s
);

  logic [ROM_DW-1:0] word;

  rom256x8 #(
    .ADDR_W  (ROM_AW),
    .DATA_W  (ROM_DW),
    .CONTENTS(counter_image(WEIGHTS, OUT_W))
  ) u_rom (
    .addr(x),
    .data(word)
  );

  assign s = word[OUT_W-1:0];

endmodule

// rom256x8: the one standard device from which the whole multiplier is built,
// a 256-word x 8-bit read-only memory (the size is a parameter; the default is
// 256 x 8).
//
// The word at address `addr` appears on `data` combinationally; a real part's
// access time is the "unit delay" of the design, and the multiplier's total
// delay is counted in these units. The contents are given through the
// CONTENTS parameter (word a in bits [a*DATA_W +: DATA_W]); the default is all
// zero, an unprogrammed part. Chip and output enables of a catalogue part are
// left out: the device is always enabled. Those two choices are this
// implementation's own.
module rom256x8 #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  parameter logic [(2**ADDR_W)*DATA_W-1:0] CONTENTS = '0
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  for (genvar a = 0; a < 2**ADDR_W; a++) begin : g_word
    assign mem[a] = CONTENTS[a*DATA_W +: DATA_W];
  end

  assign data = mem[addr];

endmodule

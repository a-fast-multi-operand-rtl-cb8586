// momul_pkg: types, sizes and ROM-programming functions shared by the
// three-operand multiplier.
//
// Every device of the multiplier is the same 256-word x 8-bit ROM. What makes
// one device a multiplier and another a counter is only its contents, so the
// contents are computed here, by constant functions, from the rule each device
// follows. A generalized counter adds its address bits, each bit carrying a
// power-of-two weight relative to the counter's lowest output bit; its word is
// that sum, kept to OUT_W bits.
//
// The 4-bit operand width, the 256 x 8 ROM and the (2,2,4;8) device follow the
// described design. The encoding of the weight table (three bits per input) is this implementation's own.
package momul_pkg;

  // ROM geometry of the single device type.
  localparam int unsigned ROM_AW = 8;
  localparam int unsigned ROM_DW = 8;
  localparam int unsigned ROM_WORDS = 2 ** ROM_AW;

  // Operand width and number of operands of the built multiplier.
  localparam int unsigned N_BITS = 4;
  localparam int unsigned N_OPS  = 3;
  localparam int unsigned PROD_W = N_OPS * N_BITS;  // 12

  // Contents of one 256 x 8 ROM, word a in bits [a*8 +: 8].
  typedef logic [ROM_WORDS*ROM_DW-1:0] rom_image_t;

  // Weight exponent of each counter input; element i belongs to address bit i
  // (an assignment pattern lists input 7 first, like a concatenation).
  typedef logic [ROM_AW-1:0][2:0] weights_t;

  // The partial-product matrix of the first stage ("Matrix 1"): the 8-bit
  // words of multiplier devices A, B, C and D.
  typedef enum logic [1:0] {MUL_A = 2'd0, MUL_B = 2'd1, MUL_C = 2'd2, MUL_D = 2'd3} mul_id_e;
  typedef logic [3:0][ROM_DW-1:0] matrix1_t;

  // Weight of bit 0 of each multiplier's word: A = lo*lo, B and C = lo*hi,
  // D = hi*hi halves of operands 1 and 2.
  function automatic int unsigned mul_shift(mul_id_e m);
    case (m)
      MUL_A:   return 0;
      MUL_B:   return 2;
      MUL_C:   return 2;
      default: return 4;
    endcase
  endfunction

  // ROM image of a generalized counter.
  function automatic rom_image_t counter_image(weights_t w, int unsigned out_w);
    rom_image_t img;
    logic [ROM_AW-1:0] a;
    int unsigned s;
    img = '0;
    for (int unsigned word = 0; word < ROM_WORDS; word++) begin
      a = ROM_AW'(word);
      s = 0;
      for (int unsigned i = 0; i < ROM_AW; i++)
        if (a[i]) s += 32'd1 << w[i];
      s = s & ((32'd1 << out_w) - 1);
      img[word*ROM_DW +: ROM_DW] = ROM_DW'(s);
    end
    return img;
  endfunction

endpackage

# Three-operand multiplier from identical ROMs

Multiplying three numbers with two ordinary multipliers in a row means
waiting for the first product before the second multiplication can start,
so the delay grows with every operand added. This design instead produces
all partial products of `op1 * op2 * op3` in one step and then adds them up
in a tree of counters, so the delay grows only with the logarithm of the
number of operands. Every device in it is the same part: a 256-word x 8-bit
ROM. Four ROMs are programmed as small three-operand multipliers, seven as
weighted bit counters, and together they multiply three 4-bit numbers into a
12-bit product in four ROM access times, without a carry-lookahead adder.

The RTL is combinational SystemVerilog. Each ROM is modelled as a lookup
array whose contents are computed at elaboration time from the rule the
device follows, so there is no data file to maintain.

## Structure

```
op1, op2, op3 (4 bits each)
      |
  pp_generator        stage 0: ROMs A-D, (2,2,4;8) multiple multipliers
      |  32-bit partial-product matrix (Matrix 1)
  counter_network     stage 1: ROMs E, F, G, H
      |               stage 2: ROMs I, J
      |               stage 3: ROM K
  product (12 bits)
```

| Module | Role |
|---|---|
| `mo_mult3x4` | top: `product = op1 * op2 * op3` |
| `pp_generator` | multiplier array, ROMs A-D |
| `counter_network` | three counter stages, ROMs E-K |
| `multiple_multiplier` | a (p1, p2, p3; q) multiplier in one ROM |
| `gen_counter` | a weighted counter in one 256 x 8 ROM |
| `rom256x8` | the ROM device itself |
| `momul_pkg` | sizes, the `matrix1_t` type, the counter ROM image function |

## Multiple multipliers

A (p1, p2, ..., pd; q) multiplier multiplies d operands of p1, ..., pd bits
at once. Its product length is q = p1 + ... + pd, so it never overflows. A
ROM with 2^q words of q bits implements it: the address lines are split into
the operand fields and each word holds the product. A (2, 2, 4; 8)
multiplier is therefore exactly one 256 x 8 ROM. In `multiple_multiplier`,
operand 1 occupies the lowest P1 address bits, operand 2 the next P2 bits
and operand 3 the top P3 bits.

`pp_generator` cuts operands 1 and 2 into 2-bit halves and keeps operand 3
whole:

| ROM | computes | weight of its bit 0 |
|---|---|---|
| A | `op1[1:0] * op2[1:0] * op3` | 2^0 |
| B | `op1[3:2] * op2[1:0] * op3` | 2^2 |
| C | `op1[1:0] * op2[3:2] * op3` | 2^2 |
| D | `op1[3:2] * op2[3:2] * op3` | 2^4 |

so `op1*op2*op3 = A + 4B + 4C + 16D`. The matrix has 4 x 8 = 32 bits.
Forming it with 3-input AND gates would need n^d = 4^3 = 64 bits, and every
extra bit costs counter inputs later. In general a (p1..pd; q) array
gives between q * prod(floor(n/pi)) and q * prod(ceil(n/pi)) bits.

## The counter network

This is the hardest part to follow. A *generalized counter* takes a set of
bits, each with its own power-of-two weight, and outputs their weighted sum
in binary. As a ROM, its address lines are the input bits and the word at
each address is the sum. A counter whose inputs can add up to S needs
floor(log2 S) + 1 output bits. `gen_counter` takes a table of eight weight
exponents (`WEIGHTS`, relative to its lowest output bit) and the number of
outputs `OUT_W`.

Each stage groups the bits of the current matrix into sets of up to eight
bits of neighbouring weights. Each set goes to one counter. Bits that are
already final leave early as product bits. The numbers below are absolute
bit weights, input pins listed as they are wired.

| Stage | ROM | input weights | output weights |
|---|---|---|---|
| 1 | - | A's bits 0, 1 | product[1:0] |
| 1 | E | 2,3,4, 2,3,4, 2,3 | 2..6 (2,3 are product[3:2]) |
| 1 | F | 5,6, 5,6, 4,5, 4,5 | 4..8 |
| 1 | G | 7, 7,8, 6,7,8, 6,7 | 6..10 |
| 1 | H | 9, 9, 9, 10, 11 | 9..11 |
| 1 | - | D's weight-8 bit (bypass) | goes to J |
| 2 | I | 4,5,6 (E), 4,5,6,7 (F), 6 (G) | 4..8 (4,5,6 are product[6:4]) |
| 2 | J | 8 (F), 8,9,10 (G), 8 (bypass), 9,10,11 (H) | 8..11 |
| 3 | K | 7,8 (I), 7 (G), 8,9,10,11 (J) | 7..11 = product[11:7] |

Stage 1 has 32 input bits. Matrix 2 has 21 bits: the 17 counter outputs of
E-H that are not yet final, the bypass bit, and the four final bits
product[3:0]. Matrix 3 has the seven inputs of K plus product[6:0].

H, J and K have fewer outputs than their input sums could need: H could
reach 9, J 23 and K 34. Every bit they leave out would weigh 2^12 or more.
The network therefore computes the weighted sum of any 32-bit input matrix
modulo 2^12. For matrices that come from real operands, the sum is at most
15^3 = 3375, so the dropped bits are always zero. The end-to-end testbench
checks this for every operand triple. The largest counter sums it sees are
6 for H, 12 for J and 26 for K.

Because each counter resolves its carries internally, the last stage already
delivers the final binary product. No carry-propagate adder is needed.

## Timing

There is no clock. Every ROM is one unit of delay. The longest path passes
four ROMs: A-D, then E-H, then I-J, then K. The total delay is therefore four
ROM access times, one for each stage. The RTL models the ROMs as zero-delay
lookups, so a simulation shows the function but not this delay. The delay
follows from the structure.

## Where this RTL makes its own choices

The multiplier array, the counter groups, the pin weights and the product
bits follow the design as described. The following choices were left open
and are this implementation's own:

- The operands are unsigned.
- The interface is purely combinational, with no registers or handshake.
- The ROM has no chip or output enable. Its default contents are all zero.
- The high half of operand 1 goes to B and the high half of operand 2 goes
  to C. Swapping them gives the same product.
- The choice among bits of equal weight is free. A bit of weight 6 could
  come from A, B, C or D, and which one goes to which counter pin does not
  change the sum. The assignment used is listed in `counter_network.sv`.
  The weight-8 bit that bypasses stage 1 is D's.
- Unused counter inputs are tied to 0. H has three, K one.
- `multiple_multiplier` has exactly three operands (P1, P2, P3). The
  general d-operand form is not parameterized.

The network is built only for three 4-bit operands. There is no general
rule for grouping a larger matrix into counters, so no larger size is
given. The ROM primitives (`multiple_multiplier`, `gen_counter`) are
parameterized and can be reused to build one by hand.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_rom256x8` | all 256 words of a programmed ROM and of an unprogrammed one |
| `tb_multiple_multiplier` | every input of (2,2,4;8) and of (1,3,4;8) |
| `tb_gen_counter` | all 256 inputs for the pin weights of E, H and K |
| `tb_pp_generator` | all 4096 triples, each partial product and their weighted sum |
| `tb_counter_network` | the sum modulo 2^12 for 20 034 matrices: random, corner and single-bit |
| `tb_mo_mult3x4` | all 4096 triples at full size (see below) |

`tb_mo_mult3x4` also counts how often each mechanism is exercised: the
bypass bit, early product bits, the top output of every counter and the
full-scale product. It fails if any count is zero. It observes the counters
through a reference model of the stages written from the weight table, not
through the RTL.

To run one testbench with Verilator:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_mo_mult3x4 \
    -y rtl -y tb +libext+.sv rtl/momul_pkg.sv tb/tb_mo_mult3x4.sv
./obj_dir/Vtb_mo_mult3x4
```

Replace the top-module and the testbench file for the others. All of them
finish in well under a second.

## Changing it

- To change what a ROM does, change its contents function.
  `momul_pkg::counter_image` programs counters. `product_image` in
  `multiple_multiplier` programs multipliers.
- To rewire a counter, edit its `W_*` weight pattern and its `x`
  concatenation in `counter_network.sv` together. Both list pin 7 first.
- Lint reports unused upper ROM data bits in counters with fewer than eight
  outputs. Those bits are programmed to zero and left unconnected on
  purpose.

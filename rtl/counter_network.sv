// counter_network: sums the 32 partial-product bits of Matrix 1 to the 12-bit
// product with seven ROM counters (E-K) in three stages and no carry-lookahead
// adder.
//
// Every counter takes up to eight matrix bits of neighbouring weights and
// gives their sum as a short binary number; bits that are already final go
// straight to the product. Weights below are absolute bit positions.
//   Stage 1 (Matrix 1, 32 bits):
//     A0, A1                        -> product[1:0]
//     E: 2,3,4, 2,3,4, 2,3          -> 2..6    (2,3 -> product[3:2])
//     F: 5,6, 5,6, 4,5, 4,5         -> 4..8
//     G: 7, 7,8, 6,7,8, 6,7         -> 6..10
//     H: 9, 9, 9,10,11              -> 9..11
//     one weight-8 bit of D passes to stage 2 unchanged
//   Stage 2 (Matrix 2, 21 bits including the four final ones):
//     I: 4,5,6, 4,5,6,7, 6          -> 4..8    (4,5,6 -> product[6:4])
//     J: 8, 8,9,10, 8, 9,10,11      -> 8..11
//   Stage 3 (Matrix 3):
//     K: 7,8, 7, 8,9,10,11          -> 7..11   (-> product[11:7])
// H, J and K print fewer outputs than their input sums could need; the
// missing bits would weigh 2^12 or more, so the network computes the weighted
// sum of its inputs modulo 2^12 for any input, and the exact product for the
// matrices the multiplier array produces (at most 15^3 = 3375).
// Combinational; three ROM delays from pp to product.
//
// The counter grouping, the pin weights and the output bits follow the
// described design. Where several matrix bits of equal weight exist, which
// one goes to which pin is this implementation's choice.
module counter_network
  import momul_pkg::*;
(
  input  matrix1_t           pp,
  output logic [PROD_W-1:0]  product
);

  // Counter pin weights relative to each counter's lowest output, listed from
  // input 7 down to input 0 in the same order as the x concatenations below.
  localparam weights_t W_E = '{3'd1, 3'd0, 3'd2, 3'd1, 3'd0, 3'd2, 3'd1, 3'd0};
  localparam weights_t W_F = '{3'd1, 3'd0, 3'd1, 3'd0, 3'd2, 3'd1, 3'd2, 3'd1};
  localparam weights_t W_G = '{3'd1, 3'd0, 3'd2, 3'd1, 3'd0, 3'd2, 3'd1, 3'd1};
  localparam weights_t W_H = '{3'd0, 3'd0, 3'd0, 3'd2, 3'd1, 3'd0, 3'd0, 3'd0};
  localparam weights_t W_I = '{3'd2, 3'd3, 3'd2, 3'd1, 3'd0, 3'd2, 3'd1, 3'd0};
  localparam weights_t W_J = '{3'd3, 3'd2, 3'd1, 3'd0, 3'd2, 3'd1, 3'd0, 3'd0};
  localparam weights_t W_K = '{3'd0, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0, 3'd1, 3'd0};

  logic [ROM_DW-1:0] a, b, c, d;
  assign a = pp[MUL_A];  // bit k has weight k
  assign b = pp[MUL_B];  // bit k has weight k+2
  assign c = pp[MUL_C];  // bit k has weight k+2
  assign d = pp[MUL_D];  // bit k has weight k+4

  logic [4:0] e_s, f_s, g_s, i_s, k_s;  // E: 2..6, F: 4..8, G: 6..10, I: 4..8, K: 7..11
  logic [2:0] h_s;                      // 9..11
  logic [3:0] j_s;                      // 8..11
  logic       d8_bypass;                // weight 8, stage 1 -> stage 2

  // Stage 1
  gen_counter #(.WEIGHTS(W_E), .OUT_W(5)) u_cnt_e (
    .x({c[1], c[0], b[2], b[1], b[0], a[4], a[3], a[2]}),  // C3 C2 B4 B3 B2 A4 A3 A2
    .s(e_s));
  gen_counter #(.WEIGHTS(W_F), .OUT_W(5)) u_cnt_f (
    .x({d[1], d[0], c[3], c[2], b[4], b[3], a[6], a[5]}),  // D5 D4 C5 C4 B6 B5 A6 A5
    .s(f_s));
  gen_counter #(.WEIGHTS(W_G), .OUT_W(5)) u_cnt_g (
    .x({d[3], d[2], c[6], c[5], c[4], b[6], b[5], a[7]}),  // D7 D6 C8 C7 C6 B8 B7 A7
    .s(g_s));
  gen_counter #(.WEIGHTS(W_H), .OUT_W(3)) u_cnt_h (
    .x({3'b000, d[7], d[6], d[5], c[7], b[7]}),            // - - - D11 D10 D9 C9 B9
    .s(h_s));
  assign d8_bypass = d[4];

  // Stage 2
  gen_counter #(.WEIGHTS(W_I), .OUT_W(5)) u_cnt_i (
    .x({g_s[0], f_s[3], f_s[2], f_s[1], f_s[0], e_s[4], e_s[3], e_s[2]}),  // 6 7 6 5 4 6 5 4
    .s(i_s));
  gen_counter #(.WEIGHTS(W_J), .OUT_W(4)) u_cnt_j (
    .x({h_s[2], h_s[1], h_s[0], d8_bypass, g_s[4], g_s[3], g_s[2], f_s[4]}),  // 11 10 9 8 10 9 8 8
    .s(j_s));

  // Stage 3
  gen_counter #(.WEIGHTS(W_K), .OUT_W(5)) u_cnt_k (
    .x({1'b0, j_s[3], j_s[2], j_s[1], j_s[0], g_s[1], i_s[4], i_s[3]}),  // - 11 10 9 8 7 8 7
    .s(k_s));

  assign product = {k_s, i_s[2:0], e_s[1:0], a[1:0]};

endmodule

// tb_gen_counter: drives all 256 input patterns into three generalized
// counters with the pin weights of devices E (8 inputs, 5 outputs),
// H (5 inputs, 3 outputs, sum kept modulo 8) and K (7 inputs, 5 outputs) and
// compares each output with the weighted bit sum worked out here. One pattern
// per clock; a watchdog ends the run if it stalls.
module tb_gen_counter;
  import momul_pkg::*;

  localparam weights_t W_E = '{3'd1, 3'd0, 3'd2, 3'd1, 3'd0, 3'd2, 3'd1, 3'd0};
  localparam weights_t W_H = '{3'd0, 3'd0, 3'd0, 3'd2, 3'd1, 3'd0, 3'd0, 3'd0};
  localparam weights_t W_K = '{3'd0, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0, 3'd1, 3'd0};
  // The same weights as plain integer tables, input 0 first.
  localparam int TE [8] = '{0, 1, 2, 0, 1, 2, 0, 1};
  localparam int TH [8] = '{0, 0, 0, 1, 2, 0, 0, 0};
  localparam int TK [8] = '{0, 1, 0, 1, 2, 3, 4, 0};

  logic       clk = 1'b0;
  logic [7:0] x;
  logic [4:0] s_e, s_k;
  logic [2:0] s_h;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  gen_counter #(.WEIGHTS(W_E), .OUT_W(5)) dut_e (.x(x),                 .s(s_e));
  gen_counter #(.WEIGHTS(W_H), .OUT_W(3)) dut_h (.x({3'b000, x[4:0]}),  .s(s_h));
  gen_counter #(.WEIGHTS(W_K), .OUT_W(5)) dut_k (.x({1'b0, x[6:0]}),    .s(s_k));

  function automatic int wsum(logic [7:0] v, int t [8]);
    int s = 0;
    for (int i = 0; i < 8; i++) if (v[i]) s += 2 ** t[i];
    return s;
  endfunction

  initial begin
    int e, h, k;
    for (int unsigned a = 0; a < 256; a++) begin
      x = 8'(a);
      @(posedge clk);
      e = wsum(x, TE);
      h = wsum({3'b000, x[4:0]}, TH);
      k = wsum({1'b0, x[6:0]}, TK);
      checks++;
      if (s_e !== 5'(e)) begin failures++; $display("FAIL E x=%h got %0d exp %0d", x, s_e, e); end
      checks++;
      if (s_h !== 3'(h % 8)) begin failures++; $display("FAIL H x=%h got %0d exp %0d", x, s_h, h % 8); end
      checks++;
      if (s_k !== 5'(k % 32)) begin failures++; $display("FAIL K x=%h got %0d exp %0d", x, s_k, k % 32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

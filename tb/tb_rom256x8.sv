// tb_rom256x8: programs the 256 x 8 ROM with a scrambled pattern and reads
// every address back, one per clock, comparing with the pattern's formula
// word(a) = (a*37 + 11) ^ (a >> 3), mod 256. A second, unprogrammed instance
// must read zero everywhere. A watchdog ends the run if it stalls.
module tb_rom256x8;

  function automatic logic [7:0] pattern(int unsigned a);
    return 8'((a * 37 + 11) ^ (a >> 3));
  endfunction

  function automatic logic [2047:0] image();
    logic [2047:0] img;
    for (int unsigned a = 0; a < 256; a++) img[a*8 +: 8] = pattern(a);
    return img;
  endfunction

  logic       clk = 1'b0;
  logic [7:0] addr;
  logic [7:0] data, blank;
  int         checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  rom256x8 #(.CONTENTS(image())) dut (.addr(addr), .data(data));
  rom256x8                       dut_blank (.addr(addr), .data(blank));

  initial begin
    addr = '0;
    for (int unsigned a = 0; a < 256; a++) begin
      addr = 8'(a);
      @(posedge clk);
      checks++;
      if (data !== pattern(a)) begin
        failures++;
        $display("FAIL addr=%0d data=%h expected=%h", a, data, pattern(a));
      end
      checks++;
      if (blank !== 8'h00) begin
        failures++;
        $display("FAIL unprogrammed addr=%0d data=%h", a, blank);
      end
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

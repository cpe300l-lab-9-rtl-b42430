// mips_de2_top_full_tb: the board-level design at its default settings runs
// the standard test program to the end. It checks the two stores (7 to address
// 80, then 7 to address 84 from the instruction at 0x44) and that the
// displays then read 07 54 0044.
module mips_de2_top_full_tb;
  logic        clk = 1, reset;
  logic [6:0]  hex [8];
  logic [17:0] ledr;
  logic [31:0] writedata, dataadr, pc;
  logic        memwrite;
  int checks = 0, failures = 0;
  int cycle = 0;

  mips_de2_top dut (.*);

  always #5 clk = ~clk;  // starts high: rising edges at 10, 20, 30 ns

  function automatic logic [3:0] seg2hex(logic [6:0] s);
    logic [6:0] glyph [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                               7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int d = 0; d < 16; d++) if (glyph[d] == s) return 4'(d);
    return 4'hX;
  endfunction

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; #22; reset = 0;
  end

  always @(negedge clk) if (!reset) begin
    cycle++;
    if (memwrite) begin
      checks++;
      if (dataadr === 80 && writedata === 7) begin
        $display("cycle %0d: stored 7 at 80", cycle);
      end else if (dataadr === 84 && writedata === 7) begin
        automatic logic [31:0] v = 0;
        for (int i = 7; i >= 0; i--) v = (v << 4) | 32'(seg2hex(hex[i]));
        $display("cycle %0d: stored 7 at 84, displays %h", cycle, v);
        checks++;
        if (v !== 32'h0754_0044 || pc !== 32'h44 || cycle != 16) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end else begin
        failures++;
        $display("unexpected store of %h to %h", writedata, dataadr);
      end
    end
    if (cycle > 40) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

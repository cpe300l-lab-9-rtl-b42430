// hex7seg_tb: every hex digit against the list of lit segments (a-g) of the
// usual seven-segment glyph, with the active-low polarity of the board.
module hex7seg_tb;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex7seg dut (.digit(digit), .seg(seg));

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcdfg", "abcefg", "cdefg", "adef",
                      "bcdeg", "adefg", "aefg"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] e;
    for (int d = 0; d < 16; d++) begin
      e = 7'h7F;
      for (int k = 0; k < lit[d].len(); k++) e[3'(lit[d][k] - 8'h61)] = 1'b0;
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== e) begin
        failures++;
        $display("digit %h: got %b expected %b", d, seg, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

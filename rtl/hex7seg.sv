// hex7seg: hexadecimal digit to seven-segment display decoder.
//
// Combinational. seg[6:0] drives segments g,f,e,d,c,b,a (seg[0] = a, the top
// segment, going clockwise to f, then g in the middle). Segments are active
// low, as on the DE2 board's displays. Digits A-F are shown as A, b, C, d,
// E, F. The segment order and polarity are this design's reading of the
// board; the decoder itself is the usual one.
module hex7seg (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  logic [6:0] on;  // active-high pattern, bit 0 = segment a

  always_comb begin
    unique case (digit)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;
    endcase
  end

  assign seg = ~on;

endmodule

// mips_de2_top: the MIPS subset computer as shown on a DE2 board.
//
// The processor runs one instruction per rising edge of clk; on the board
// clk would come from a debounced push-button so the program can be stepped
// one instruction at a time. Eight seven-segment displays show, as hex:
// HEX7-HEX6 the low byte of writedata (the value a store writes), HEX5-HEX4
// the low byte of dataadr (the data address), HEX3-HEX0 the low 16 bits of
// the PC. ledr[0] lights during a store. For the standard test program the last
// instruction shows 07, 54 (84 decimal) and 0044, the register value, memory
// location and instruction address expected on the board.
// Which value goes on which display, and the LED, are this design's choices.
// hex[i] drives display HEXi, active low, bit 0 = segment a.
module mips_de2_top #(
  parameter string MEMFILE = "rtl/mips_test.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [6:0]  hex [8],
  output logic [17:0] ledr,
  output logic [31:0] writedata,
  output logic [31:0] dataadr,
  output logic        memwrite,
  output logic [31:0] pc
);

  logic [3:0] digit [8];

  MIPSsubset #(.MEMFILE(MEMFILE)) cpu (
    .clk(clk), .reset(reset), .writedata(writedata), .dataadr(dataadr),
    .memwrite(memwrite), .pc(pc)
  );

  assign digit[7] = writedata[7:4];
  assign digit[6] = writedata[3:0];
  assign digit[5] = dataadr[7:4];
  assign digit[4] = dataadr[3:0];
  assign digit[3] = pc[15:12];
  assign digit[2] = pc[11:8];
  assign digit[1] = pc[7:4];
  assign digit[0] = pc[3:0];

  for (genvar i = 0; i < 8; i++) begin : g_hex
    hex7seg dec (.digit(digit[i]), .seg(hex[i]));
  end

  assign ledr = {17'b0, memwrite};

endmodule

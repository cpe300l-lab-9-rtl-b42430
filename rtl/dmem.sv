// dmem: data memory of the single-cycle MIPS subset.
//
// DEPTH 32-bit words. Reads are combinational: rd is the word at word
// address a in the same cycle. Writes happen on the rising clock edge, one
// enable per byte lane (we[3] writes bits 31:24), so sw, sh and sb all store
// in one cycle. Contents start at zero. The 64-word depth and the byte-lane
// enables are this design's choices.
module dmem #(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic [3:0]               we,
  input  logic [$clog2(DEPTH)-1:0] a,
  input  logic [31:0]              wd,
  output logic [31:0]              rd
);

  logic [31:0] ram [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) ram[i] = '0;

  always_ff @(posedge clk)
    for (int b = 0; b < 4; b++)
      if (we[b]) ram[a][8*b +: 8] <= wd[8*b +: 8];

  assign rd = ram[a];

endmodule

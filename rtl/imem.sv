// imem: instruction memory of the single-cycle MIPS subset.
//
// A read-only array of DEPTH 32-bit words, read combinationally: rd is the
// word at word address a (byte address bits 2 and up), available in the same
// cycle. Its contents are loaded at start-up from the hex file MEMFILE (one
// word per line); words the file does not give read as zero, which the core
// executes as a no-op. The 64-word depth and the file loading are this
// design's choices.
module imem #(
  parameter int unsigned DEPTH   = 64,
  parameter string       MEMFILE = "rtl/mips_test.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] a,
  output logic [31:0]              rd
);

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    $readmemh(MEMFILE, rom);
  end

  assign rd = rom[a];

endmodule

// MIPSsubset: the single-cycle MIPS subset computer - core, instruction
// memory and data memory.
//
// One instruction is fetched, executed and retired per rising clock edge.
// The ports are those a testbench of the reference design observes: writedata (the value a
// store writes), dataadr (the ALU result, which is the data address for loads
// and stores) and memwrite (high during a store). pc is added so a board can
// show it. Reset is active high and puts the PC at 0.
// Both memories are indexed by byte address bits 2 and up, so with the
// default 64 words each, addresses wrap every 256 bytes. The composition
// follows the reference design; the memory depths and program file are this design's.
module MIPSsubset #(
  parameter int unsigned IMEM_DEPTH = 64,
  parameter int unsigned DMEM_DEPTH = 64,
  parameter string       MEMFILE    = "rtl/mips_test.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] writedata,
  output logic [31:0] dataadr,
  output logic        memwrite,
  output logic [31:0] pc
);

  logic [31:0] instr, readdata, memwdata;
  logic [3:0]  byteen;

  mips mips (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr),
    .memwrite(memwrite), .aluout(dataadr), .writedata(writedata),
    .memwdata(memwdata), .byteen(byteen), .readdata(readdata)
  );

  imem #(.DEPTH(IMEM_DEPTH), .MEMFILE(MEMFILE)) imem (
    .a(pc[$clog2(IMEM_DEPTH)+1:2]), .rd(instr)
  );

  dmem #(.DEPTH(DMEM_DEPTH)) dmem (
    .clk(clk), .we(byteen), .a(dataadr[$clog2(DMEM_DEPTH)+1:2]),
    .wd(memwdata), .rd(readdata)
  );

endmodule

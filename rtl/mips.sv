// mips: single-cycle MIPS subset processor core (controller + datapath).
//
// The combinational controller decodes the instruction fetched at pc and
// drives the datapath, which executes it in the same clock cycle. Memories
// are outside: instr comes from instruction memory, aluout/memwdata/byteen
// go to data memory and readdata comes back from it, all within the cycle.
// memwrite is high for a store; writedata is the unsteered rt value (what a
// sw stores). Reset puts the PC at 0.
module mips
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  input  logic [31:0] instr,
  output logic        memwrite,
  output logic [31:0] aluout,
  output logic [31:0] writedata,
  output logic [31:0] memwdata,
  output logic [3:0]  byteen,
  input  logic [31:0] readdata
);

  ctrl_t   ctrl;
  aluctl_e alucontrol;
  logic    zero, pcsrc;

  controller c (
    .op(instr[31:26]), .funct(instr[5:0]), .zero(zero),
    .ctrl(ctrl), .alucontrol(alucontrol), .pcsrc(pcsrc)
  );

  datapath dp (
    .clk(clk), .reset(reset), .ctrl(ctrl), .alucontrol(alucontrol),
    .pcsrc(pcsrc), .zero(zero), .pc(pc), .instr(instr),
    .aluout(aluout), .writedata(writedata), .memwdata(memwdata),
    .byteen(byteen), .readdata(readdata)
  );

  assign memwrite = ctrl.memwrite;

endmodule

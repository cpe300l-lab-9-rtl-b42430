// datapath: single-cycle MIPS datapath.
//
// Every instruction completes in one clock cycle. The program counter
// register (pcreg) addresses instruction memory; the next PC is PC+4, the
// branch target PC+4+(sign-extended immediate << 2) when PCSrc is high, or
// the jump target {PC+4[31:28], instr[25:0], 00} when jump is high. The
// register file is read at rs and rt; the ALU takes rs and either rt or the
// sign-extended immediate; the result written back to rd (R-type) or rt is
// the ALU output or the load data. The ALU output is the data-memory
// address and rt is the store data; memalign steers byte and halfword
// accesses. All control comes from the combinational controller.
// The block split and the jump/branch arithmetic are the standard MIPS
// single-cycle organisation of the reference design; memalign is this design's.
module datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  ctrl_t       ctrl,
  input  aluctl_e     alucontrol,
  input  logic        pcsrc,
  output logic        zero,
  output logic [31:0] pc,
  input  logic [31:0] instr,
  output logic [31:0] aluout,     // data-memory address
  output logic [31:0] writedata,  // rt value, before lane steering
  output logic [31:0] memwdata,   // lane-steered store data
  output logic [3:0]  byteen,     // data-memory byte write enables
  input  logic [31:0] readdata    // word read from data memory
);

  logic [31:0] pcnext, pcplus4, pcbranch, signimm, srca, srcb, result, loaddata;
  logic [4:0]  writereg;

  // Next-PC logic
  flopr #(.WIDTH(32)) pcreg (.clk(clk), .reset(reset), .d(pcnext), .q(pc));

  assign pcplus4  = pc + 32'd4;
  assign signimm  = {{16{instr[15]}}, instr[15:0]};
  assign pcbranch = pcplus4 + {signimm[29:0], 2'b00};

  always_comb begin
    if (ctrl.jump)  pcnext = {pcplus4[31:28], instr[25:0], 2'b00};
    else if (pcsrc) pcnext = pcbranch;
    else            pcnext = pcplus4;
  end

  // Register file
  assign writereg = ctrl.regdst ? instr[15:11] : instr[20:16];
  assign result   = ctrl.memtoreg ? loaddata : aluout;

  regfile rf (
    .clk(clk), .we3(ctrl.regwrite),
    .ra1(instr[25:21]), .ra2(instr[20:16]), .wa3(writereg),
    .wd3(result), .rd1(srca), .rd2(writedata)
  );

  // ALU
  assign srcb = ctrl.alusrc ? signimm : writedata;

  alu #(.WIDTH(32)) alu_i (
    .a(srca), .b(srcb), .alucontrol(alucontrol), .result(aluout), .zero(zero)
  );

  // Byte and halfword steering
  memalign ma (
    .addr(aluout[1:0]), .memsize(ctrl.memsize), .memsigned(ctrl.memsigned),
    .memwrite(ctrl.memwrite), .storedata(writedata), .readword(readdata),
    .wdata(memwdata), .byteen(byteen), .loaddata(loaddata)
  );

endmodule

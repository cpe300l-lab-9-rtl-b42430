// controller: combinational control unit of the single-cycle MIPS subset.
//
// It has no clock, reset or state. The main decoder maps the opcode to the
// datapath controls and an ALUOp; the ALU decoder maps ALUOp and funct to the
// ALU operation; an AND gate combines the branch signal with the ALU's zero
// flag to form PCSrc, which selects the branch target as the next PC. This
// structure is the reference design's. Immediate assertions check that
// the decoded controls are mutually consistent.
module controller
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       zero,
  output ctrl_t      ctrl,
  output aluctl_e    alucontrol,
  output logic       pcsrc
);

  maindec md (.op(op), .ctrl(ctrl));
  aludec  ad (.funct(funct), .aluop(ctrl.aluop), .alucontrol(alucontrol));

  assign pcsrc = ctrl.branch & zero;

  // A single-cycle instruction never both writes memory and a register,
  // and is never both a branch and a jump.
  always_comb begin
    assert (!(ctrl.memwrite && ctrl.regwrite))
      else $error("store decoded with register write, op=%h", op);
    assert (!(ctrl.branch && ctrl.jump))
      else $error("branch and jump decoded together, op=%h", op);
  end

endmodule

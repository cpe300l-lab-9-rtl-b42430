// aludec: ALU decoder of the single-cycle MIPS subset control unit.
//
// Purely combinational. ALUOp 00 asks for an addition (address calculation
// for loads and stores, addi, and j), 01 for a subtraction (beq compares by
// subtracting), and 10 hands the choice to the R-type funct field: add, addu,
// sub, subu, and, or, xor, nor, slt and sltu. addu and subu use the same
// adder as add and sub because this design raises no overflow exception.
// The ALUOp meanings and the instruction list follow the reference design;
// an unknown funct (or the unused ALUOp 11) selects an addition, which is
// this design's choice.
module aludec
  import mips_pkg::*;
(
  input  logic [5:0] funct,
  input  aluop_e     aluop,
  output aluctl_e    alucontrol
);

  always_comb begin
    alucontrol = ALU_ADD;
    unique case (aluop)
      ALUOP_ADD: alucontrol = ALU_ADD;
      ALUOP_SUB: alucontrol = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD, FN_ADDU: alucontrol = ALU_ADD;
          FN_SUB, FN_SUBU: alucontrol = ALU_SUB;
          FN_AND:          alucontrol = ALU_AND;
          FN_OR:           alucontrol = ALU_OR;
          FN_XOR:          alucontrol = ALU_XOR;
          FN_NOR:          alucontrol = ALU_NOR;
          FN_SLT:          alucontrol = ALU_SLT;
          FN_SLTU:         alucontrol = ALU_SLTU;
          default:         alucontrol = ALU_ADD;
        endcase
      end
      default: alucontrol = ALU_ADD;
    endcase
  end

endmodule

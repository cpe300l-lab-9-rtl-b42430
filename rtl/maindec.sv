// maindec: main decoder of the single-cycle MIPS subset control unit.
//
// Purely combinational. It turns the 6-bit opcode into the datapath control
// signals (register write, destination select, ALU source, branch, memory
// write, memory-to-register, jump), the 2-bit ALUOp for the ALU decoder, and
// the width and signedness of a load or store.
//
// Supported opcodes: R-type, addi, beq, j, lw, sw, and the byte/halfword
// accesses lb, lbu, lh, lhu, sb, sh. The split into a main decoder and an ALU
// decoder and the ALUOp meanings (00 add, 01 subtract, 10 use funct) follow the
// reference design; the exact signal set and the all-zero output for an
// unknown opcode (it then behaves as a no-op) are this design's choices.
module maindec
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.aluop   = ALUOP_ADD;
    ctrl.memsize = SZ_WORD;
    unique case (op)
      OP_RTYPE: begin
        ctrl.regwrite = 1'b1;
        ctrl.regdst   = 1'b1;
        ctrl.aluop    = ALUOP_FUNCT;
      end
      OP_ADDI: begin
        ctrl.regwrite = 1'b1;
        ctrl.alusrc   = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.aluop  = ALUOP_SUB;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      OP_LW, OP_LH, OP_LHU, OP_LB, OP_LBU: begin
        ctrl.regwrite  = 1'b1;
        ctrl.alusrc    = 1'b1;
        ctrl.memtoreg  = 1'b1;
        ctrl.memsigned = (op == OP_LH) || (op == OP_LB);
        ctrl.memsize   = (op == OP_LW) ? SZ_WORD :
                         (op == OP_LH || op == OP_LHU) ? SZ_HALF : SZ_BYTE;
      end
      OP_SW, OP_SH, OP_SB: begin
        ctrl.alusrc   = 1'b1;
        ctrl.memwrite = 1'b1;
        ctrl.memsize  = (op == OP_SW) ? SZ_WORD :
                        (op == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      default: ;
    endcase
  end

endmodule

// aludec_tb: exhaustive check of the ALU decoder over every ALUOp and funct.
// The expected operation is derived from the instruction mnemonic each
// funct code stands for.
module aludec_tb;
  import mips_pkg::*;

  logic [5:0] funct;
  aluop_e     aluop;
  aluctl_e    alucontrol;
  int checks = 0, failures = 0;

  aludec dut (.funct(funct), .aluop(aluop), .alucontrol(alucontrol));

  function automatic aluctl_e expect_of(logic [1:0] op, logic [5:0] f);
    if (op == 2'b01) return ALU_SUB;
    if (op != 2'b10) return ALU_ADD;
    case (f)
      6'd32, 6'd33: return ALU_ADD;   // add, addu
      6'd34, 6'd35: return ALU_SUB;   // sub, subu
      6'd36:        return ALU_AND;
      6'd37:        return ALU_OR;
      6'd38:        return ALU_XOR;
      6'd39:        return ALU_NOR;
      6'd42:        return ALU_SLT;
      6'd43:        return ALU_SLTU;
      default:      return ALU_ADD;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int f = 0; f < 64; f++) begin
        aluop = aluop_e'(a);
        funct = 6'(f);
        #1;
        checks++;
        if (alucontrol !== expect_of(2'(a), 6'(f))) begin
          failures++;
          $display("aluop=%0d funct=%02h got %0d", a, f, alucontrol);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// controller_tb: checks the control unit for each instruction of the subset:
// the main controls, the ALU operation picked through ALUOp and funct, and
// PCSrc = Branch AND Zero for both values of the zero flag.
module controller_tb;
  import mips_pkg::*;

  logic [5:0] op, funct;
  logic       zero;
  ctrl_t      ctrl;
  aluctl_e    alucontrol;
  logic       pcsrc;
  int checks = 0, failures = 0;

  controller dut (.op(op), .funct(funct), .zero(zero), .ctrl(ctrl),
                  .alucontrol(alucontrol), .pcsrc(pcsrc));

  task automatic check(string name, logic [5:0] o, logic [5:0] f,
                       logic rw, logic mw, logic br, logic jp, aluctl_e ac);
    for (int z = 0; z < 2; z++) begin
      op = o; funct = f; zero = z[0];
      #1;
      checks++;
      if (ctrl.regwrite !== rw || ctrl.memwrite !== mw || ctrl.jump !== jp ||
          alucontrol !== ac || pcsrc !== (br & z[0])) begin
        failures++;
        $display("%s zero=%0d: rw=%b mw=%b jp=%b alu=%0d pcsrc=%b", name, z,
                 ctrl.regwrite, ctrl.memwrite, ctrl.jump, alucontrol, pcsrc);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("add",  6'h00, 6'h20, 1, 0, 0, 0, ALU_ADD);
    check("sub",  6'h00, 6'h22, 1, 0, 0, 0, ALU_SUB);
    check("and",  6'h00, 6'h24, 1, 0, 0, 0, ALU_AND);
    check("or",   6'h00, 6'h25, 1, 0, 0, 0, ALU_OR);
    check("slt",  6'h00, 6'h2A, 1, 0, 0, 0, ALU_SLT);
    check("nor",  6'h00, 6'h27, 1, 0, 0, 0, ALU_NOR);
    check("xor",  6'h00, 6'h26, 1, 0, 0, 0, ALU_XOR);
    check("sltu", 6'h00, 6'h2B, 1, 0, 0, 0, ALU_SLTU);
    check("addi", 6'h08, 6'h2A, 1, 0, 0, 0, ALU_ADD);
    check("lw",   6'h23, 6'h22, 1, 0, 0, 0, ALU_ADD);
    check("sw",   6'h2B, 6'h22, 0, 1, 0, 0, ALU_ADD);
    check("beq",  6'h04, 6'h24, 0, 0, 1, 0, ALU_SUB);
    check("j",    6'h02, 6'h00, 0, 0, 0, 1, ALU_ADD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// maindec_tb: exhaustive check of the main decoder over all 64 opcodes.
// The expected control word for each opcode is written out below as a
// string of flags, independently of the decoder's case statement.
module maindec_tb;
  import mips_pkg::*;

  logic [5:0] op;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  maindec dut (.op(op), .ctrl(ctrl));

  // flags: regwrite regdst alusrc branch memwrite memtoreg jump aluop(2) memsize(2) memsigned
  function automatic logic [11:0] expect_of(logic [5:0] o);
    case (o)
      6'b000000: return 12'b1_1_0_0_0_0_0_10_00_0; // R-type
      6'b001000: return 12'b1_0_1_0_0_0_0_00_00_0; // addi
      6'b000100: return 12'b0_0_0_1_0_0_0_01_00_0; // beq
      6'b000010: return 12'b0_0_0_0_0_0_1_00_00_0; // j
      6'b100011: return 12'b1_0_1_0_0_1_0_00_00_0; // lw
      6'b100001: return 12'b1_0_1_0_0_1_0_00_01_1; // lh
      6'b100101: return 12'b1_0_1_0_0_1_0_00_01_0; // lhu
      6'b100000: return 12'b1_0_1_0_0_1_0_00_10_1; // lb
      6'b100100: return 12'b1_0_1_0_0_1_0_00_10_0; // lbu
      6'b101011: return 12'b0_0_1_0_1_0_0_00_00_0; // sw
      6'b101001: return 12'b0_0_1_0_1_0_0_00_01_0; // sh
      6'b101000: return 12'b0_0_1_0_1_0_0_00_10_0; // sb
      default:   return 12'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      #1;
      checks++;
      if (12'(ctrl) !== expect_of(op)) begin
        failures++;
        $display("op=%02h got %b expected %b", op, 12'(ctrl), expect_of(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// alu_tb: the ALU against a reference model on directed corner cases and
// random operands, for every operation, including the zero flag.
module alu_tb;
  import mips_pkg::*;

  logic [31:0] a, b, result;
  aluctl_e     alucontrol;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alucontrol(alucontrol), .result(result), .zero(zero));

  function automatic logic [31:0] model(aluctl_e c, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    case (c)
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_ADD:  return 32'(longint'(x) + longint'(y));
      ALU_SUB:  return 32'(longint'(x) - longint'(y));
      ALU_XOR:  return (x | y) & ~(x & y);
      ALU_NOR:  return ~x & ~y;
      ALU_SLT:  return (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(y)) ? 32'd1 : 32'd0;
      default:  return 32'(longint'(x) + longint'(y));
    endcase
  endfunction

  task automatic try(aluctl_e c, logic [31:0] x, logic [31:0] y);
    logic [31:0] e;
    alucontrol = c; a = x; b = y;
    #1;
    e = model(c, x, y);
    checks++;
    if (result !== e || zero !== (e == 0)) begin
      failures++;
      $display("op=%0d a=%h b=%h got %h/%b expected %h", c, x, y, result, zero, e);
    end
  endtask

  aluctl_e ops[8] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_XOR, ALU_NOR, ALU_SUB, ALU_SLT, ALU_SLTU};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h5};
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j]) try(ops[k], corner[i], corner[j]);
    repeat (2000) try(ops[$urandom_range(7)], $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

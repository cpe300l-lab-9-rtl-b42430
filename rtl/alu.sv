// alu: 32-bit ALU of the single-cycle MIPS subset.
//
// Combinational. Operations: add, subtract, and, or, xor, nor, set-on-less-
// than signed (slt) and unsigned (sltu). zero is high when the result is 0;
// the datapath uses it for beq. The operation list follows the reference
// design; the operation encoding (mips_pkg::aluctl_e) is this design's.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluctl_e          alucontrol,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alucontrol)
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_ADD:  result = a + b;
      ALU_XOR:  result = a ^ b;
      ALU_NOR:  result = ~(a | b);
      ALU_SUB:  result = a - b;
      ALU_SLT:  result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: result = {{(WIDTH-1){1'b0}}, a < b};
      default:  result = a + b;
    endcase
  end

  assign zero = (result == '0);

endmodule

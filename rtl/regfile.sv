// regfile: the 32 x 32-bit MIPS register file.
//
// Two combinational read ports (rs and rt) and one write port written on the
// rising clock edge when we3 is high. Register $0 always reads as zero and a
// write to it is ignored. The registers have no reset, as in a register file
// mapped to FPGA memory; a program must write a register before relying on
// its value. The name follows the reference design; the organisation
// is the standard MIPS one.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     we3,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  input  logic [$clog2(NREGS)-1:0] wa3,
  input  logic [WIDTH-1:0]         wd3,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk)
    if (we3 && wa3 != '0) regs[wa3] <= wd3;

  assign rd1 = (ra1 != '0) ? regs[ra1] : '0;
  assign rd2 = (ra2 != '0) ? regs[ra2] : '0;

endmodule

// mips_pkg: types and constants shared by the single-cycle MIPS subset.
//
// Holds the opcode and funct encodings of the supported MIPS32 instructions
// (these are the architecture's own numbers), the 2-bit ALUOp code passed
// from the main decoder to the ALU decoder (00 add, 01 subtract, 10 look at
// funct, as in the control-unit description), the ALU operation enum, whose
// 4-bit encoding is this design's own choice, and the bundle of control
// signals the main decoder produces.
package mips_pkg;

  // Primary opcodes, instruction bits 31:26
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_LB    = 6'h20,
    OP_LH    = 6'h21,
    OP_LW    = 6'h23,
    OP_LBU   = 6'h24,
    OP_LHU   = 6'h25,
    OP_SB    = 6'h28,
    OP_SH    = 6'h29,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, instruction bits 5:0
  typedef enum logic [5:0] {
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A,
    FN_SLTU = 6'h2B
  } funct_e;

  // ALUOp from the main decoder to the ALU decoder
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10
  } aluop_e;

  // Operation performed by the ALU
  typedef enum logic [3:0] {
    ALU_AND  = 4'd0,
    ALU_OR   = 4'd1,
    ALU_ADD  = 4'd2,
    ALU_XOR  = 4'd3,
    ALU_NOR  = 4'd4,
    ALU_SUB  = 4'd6,
    ALU_SLT  = 4'd7,
    ALU_SLTU = 4'd8
  } aluctl_e;

  // Width of a data-memory access
  typedef enum logic [1:0] {
    SZ_WORD = 2'd0,
    SZ_HALF = 2'd1,
    SZ_BYTE = 2'd2
  } memsize_e;

  // Control signals from the main decoder
  typedef struct packed {
    logic     regwrite;  // write the register file
    logic     regdst;    // destination is rd (R-type) rather than rt
    logic     alusrc;    // ALU operand B is the sign-extended immediate
    logic     branch;    // beq
    logic     memwrite;  // store
    logic     memtoreg;  // register write data comes from memory
    logic     jump;      // j
    aluop_e   aluop;
    memsize_e memsize;   // access width of a load or store
    logic     memsigned; // sign-extend a byte or halfword load
  } ctrl_t;

endpackage

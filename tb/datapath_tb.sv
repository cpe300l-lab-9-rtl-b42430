// datapath_tb: drives the datapath's control inputs by hand, instruction by
// instruction, and checks ALU results, register write-back (read back via
// later instructions), load data selection, byte-lane stores, branch and
// jump targets. The testbench plays the controller; PCSrc is formed here
// from the zero flag.
module datapath_tb;
  import mips_pkg::*;

  logic        clk = 0, reset;
  ctrl_t       ctrl;
  aluctl_e     alucontrol;
  logic        pcsrc, zero;
  logic [31:0] pc, instr, aluout, writedata, memwdata, readdata;
  logic [3:0]  byteen;
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;
  assign pcsrc = ctrl.branch & zero;

  function automatic ctrl_t c(logic rw, logic rd, logic as, logic br, logic mw,
                              logic m2r, logic jp,
                              memsize_e sz = SZ_WORD, logic sg = 1'b0);
    ctrl_t t;
    t = '{regwrite: rw, regdst: rd, alusrc: as, branch: br, memwrite: mw,
          memtoreg: m2r, jump: jp, aluop: ALUOP_ADD, memsize: sz, memsigned: sg};
    return t;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  // Apply one instruction at the current PC, check it, then clock it in
  task automatic step(logic [31:0] i, ctrl_t ct, aluctl_e ac, logic [31:0] exp_pc,
                      logic [31:0] exp_alu, string what);
    instr = i; ctrl = ct; alucontrol = ac;
    #1;
    chk({what, " pc"}, pc, exp_pc);
    chk({what, " aluout"}, aluout, exp_alu);
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; alucontrol = ALU_ADD; instr = 0; readdata = 0;
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    step(32'h20020005, c(1,0,1,0,0,0,0), ALU_ADD, 32'h00, 32'd5,  "addi $2,$0,5");
    step(32'h2003000c, c(1,0,1,0,0,0,0), ALU_ADD, 32'h04, 32'd12, "addi $3,$0,12");
    step(32'h00432020, c(1,1,0,0,0,0,0), ALU_ADD, 32'h08, 32'd17, "add $4,$2,$3");
    step(32'h00622022, c(0,1,0,0,0,0,0), ALU_SUB, 32'h0C, 32'd7,  "sub (no write)");
    // sw $4, 8($0)
    instr = 32'hac040008; ctrl = c(0,0,1,0,1,0,0); alucontrol = ALU_ADD; #1;
    chk("sw writedata", writedata, 32'd17);
    chk("sw memwdata", memwdata, 32'd17);
    chk("sw byteen", {28'b0, byteen}, 32'hF);
    step(instr, ctrl, alucontrol, 32'h10, 32'd8, "sw $4,8($0)");
    // lw $5, 8($0) with the memory word supplied here
    readdata = 32'hCAFE_F00D;
    step(32'h8c050008, c(1,0,1,0,0,1,0), ALU_ADD, 32'h14, 32'd8, "lw $5,8($0)");
    readdata = 0;
    step(32'h00a03020, c(1,1,0,0,0,0,0), ALU_ADD, 32'h18, 32'hCAFE_F00D, "add $6,$5,$0");
    // lb $7, 1($0): byte 1 of 11802233 is 80 -> ffffff80
    readdata = 32'h1180_2233;
    step(32'h80070001, c(1,0,1,0,0,1,0,SZ_BYTE,1'b1), ALU_ADD, 32'h1C, 32'd1, "lb $7,1($0)");
    readdata = 0;
    step(32'h00e04020, c(1,1,0,0,0,0,0), ALU_ADD, 32'h20, 32'hFFFF_FF80, "add $8,$7,$0");
    // sb $3, 2($0): only lane 1 (bits 15:8) enabled
    instr = 32'ha0030002; ctrl = c(0,0,1,0,1,0,0,SZ_BYTE); #1;
    chk("sb byteen", {28'b0, byteen}, 32'h2);
    chk("sb memwdata", {24'b0, memwdata[15:8]}, 32'h0C);
    step(instr, ctrl, ALU_ADD, 32'h24, 32'd2, "sb $3,2($0)");
    // beq $2,$3 (not equal): falls through
    step(32'h10430003, c(0,0,0,1,0,0,0), ALU_SUB, 32'h28, 32'hFFFF_FFF9, "beq not taken");
    // beq $2,$2,+3: taken to 0x2C + 0x0C = 0x38
    instr = 32'h10420003; ctrl = c(0,0,0,1,0,0,0); alucontrol = ALU_SUB; #1;
    chk("beq zero", {31'b0, zero}, 32'd1);
    step(instr, ctrl, alucontrol, 32'h2C, 32'd0, "beq taken");
    // j 0x40 (word 0x10)
    step(32'h08000010, c(0,0,0,0,0,0,1), ALU_ADD, 32'h3C, 32'd0, "j");
    // beq backwards: beq $0,$0,-2 from 0x40 -> 0x44 - 8 = 0x3C
    step(32'h1000fffe, c(0,0,0,1,0,0,0), ALU_SUB, 32'h40, 32'd0, "beq back");
    instr = 0; ctrl = '0; #1;
    chk("pc after backward branch", pc, 32'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

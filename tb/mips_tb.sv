// mips_tb: the processor core with testbench-side memories runs a program
// that uses the instructions beyond the basic subset: nor, xor, sltu, slt,
// addu, subu, sb, sh, lb, lbu, lh, lhu, lw and sw. The results it stores
// are compared with values worked out by hand, and the core must reach the
// final self-loop after exactly one instruction per cycle.
module mips_tb;
  logic        clk = 0, reset;
  logic [31:0] pc, instr, aluout, writedata, memwdata, readdata;
  logic        memwrite;
  logic [3:0]  byteen;
  logic [31:0] rom [64];
  logic [31:0] ram [64];
  int checks = 0, failures = 0;

  mips dut (.*);

  always #5 clk = ~clk;

  assign instr    = rom[pc[7:2]];
  assign readdata = ram[aluout[7:2]];
  always_ff @(posedge clk)
    for (int b = 0; b < 4; b++)
      if (byteen[b]) ram[aluout[7:2]][8*b +: 8] <= memwdata[8*b +: 8];

  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin rom[i] = 0; ram[i] = 0; end
    $readmemh("tb/mips_ext_test.hex", rom);
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    chk("pc after reset", pc, 0);
    repeat (32) @(posedge clk);
    #1;
    chk("pc at final loop", pc, 32'h80);
    // $8 = -2, $9 = 3
    chk("nor",  ram[0], 32'h0000_0000);
    chk("xor",  ram[1], 32'hFFFF_FFFD);
    chk("sltu", ram[2], 32'd1);
    chk("slt",  ram[3], 32'd0);
    chk("addu", ram[4], 32'd1);
    chk("subu", ram[5], 32'd5);
    // sb of 0xE0 at byte 33, sh of 0xEDCC at byte 38 (big-endian)
    chk("sb word",  ram[8],  32'h00E0_0000);
    chk("sh word",  ram[9],  32'h0000_EDCC);
    chk("lw after sb", ram[10], 32'h00E0_0000);
    chk("lw after sh", ram[11], 32'h0000_EDCC);
    chk("lb",  ram[12], 32'hFFFF_FFE0);
    chk("lbu", ram[13], 32'h0000_00E0);
    chk("lh",  ram[14], 32'hFFFF_EDCC);
    chk("lhu", ram[15], 32'h0000_EDCC);
    chk("lb low byte", ram[16], 32'hFFFF_FFCC);
    // The self-loop keeps the PC in place
    repeat (5) @(posedge clk);
    #1;
    chk("pc stays in loop", pc, 32'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// MIPSsubset_tb: runs the standard test program on the single-cycle computer.
// Like the usual pass/fail check for this program, it watches every store and requires that the
// only stores are 7 to address 80 and 7 to address 84. It also compares the
// ALU result (dataadr) of every cycle with the sequence the program must
// produce, one instruction per clock, and checks that the final store
// happens in the 16th cycle after reset is released.
module MIPSsubset_tb;
  logic        clk = 1, reset;
  logic [31:0] writedata, dataadr, pc;
  logic        memwrite;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic done = 0;

  MIPSsubset dut (.*);

  // ALU result of each executed instruction: addi, addi, addi, or, and, add,
  // beq (5+... not equal), slt, beq (taken), slt, add, sub, sw, lw, j, sw
  logic [31:0] expected [16] = '{
    32'h05, 32'h0C, 32'h03, 32'h07, 32'h04, 32'h0B, 32'h08, 32'h00,
    32'h00, 32'h01, 32'h0C, 32'h07, 32'h50, 32'h50, 32'h00, 32'h54};
  logic [31:0] expected_pc [16] = '{
    32'h00, 32'h04, 32'h08, 32'h0C, 32'h10, 32'h14, 32'h18, 32'h1C,
    32'h20, 32'h28, 32'h2C, 32'h30, 32'h34, 32'h38, 32'h3C, 32'h44};

  always #5 clk = ~clk;  // starts high: rising edges at 10, 20, 30 ns

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; #22; reset = 0;
  end

  always @(negedge clk) if (!reset && !done) begin
    checks++;
    if (dataadr !== expected[cycle] || pc !== expected_pc[cycle]) begin
      failures++;
      $display("cycle %0d: pc=%h dataadr=%h expected pc=%h dataadr=%h",
               cycle, pc, dataadr, expected_pc[cycle], expected[cycle]);
    end
    if (memwrite) begin
      checks++;
      if (dataadr === 84 && writedata === 7) begin
        if (cycle != 15) begin
          failures++;
          $display("final store in cycle %0d, expected 15", cycle);
        end
        done = 1;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end else if (dataadr !== 80 || writedata !== 7) begin
        failures++;
        $display("unexpected store of %h to %h", writedata, dataadr);
      end
    end
    cycle++;
    if (cycle == 16 && !done) begin
      failures++;
      $display("no store of 7 to address 84");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

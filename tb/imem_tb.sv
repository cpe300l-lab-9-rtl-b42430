// imem_tb: the instruction memory returns the words of its program file at
// the right word addresses and zero past the end of the file. The expected
// words are the standard test program assembled by hand.
module imem_tb;
  logic [5:0]  a;
  logic [31:0] rd;
  int checks = 0, failures = 0;

  imem dut (.a(a), .rd(rd));

  // addi $2,$0,5 ; addi $3,$0,12 ; addi $7,$3,-9 ; or $4,$7,$2 ; ...
  logic [31:0] expected [18] = '{
    32'h20020005, 32'h2003000c, 32'h2067fff7, 32'h00e22025, 32'h00642824,
    32'h00a42820, 32'h10a7000a, 32'h0064202a, 32'h10800001, 32'h20050000,
    32'h00e2202a, 32'h00853820, 32'h00e23822, 32'hac670044, 32'h8c020050,
    32'h08000011, 32'h20020001, 32'hac020054};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 63; i >= 0; i--) begin
      a = 6'(i);
      #1;
      checks++;
      if (rd !== ((i < 18) ? expected[i] : 32'h0)) begin
        failures++;
        $display("word %0d: got %h", i, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

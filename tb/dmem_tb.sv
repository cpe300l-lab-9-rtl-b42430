// dmem_tb: random byte-enabled writes and reads against a model array.
// Checks that reads are combinational, that writes take effect at the clock
// edge, only in the enabled byte lanes, and that memory starts at zero.
module dmem_tb;
  logic        clk = 0;
  logic [3:0]  we;
  logic [5:0]  a;
  logic [31:0] wd, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dmem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) model[i] = 0;
    we = 0; a = 0; wd = 0;
    for (int i = 0; i < 64; i++) begin
      a = 6'(i); #1;
      checks++;
      if (rd !== 0) begin failures++; $display("word %0d not zero: %h", i, rd); end
    end
    repeat (2000) begin
      @(negedge clk);
      we = 4'($urandom); a = 6'($urandom); wd = $urandom;
      #1;
      checks++;
      if (rd !== model[a]) begin
        failures++;
        $display("read a=%0d got %h expected %h", a, rd, model[a]);
      end
      @(posedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) model[a][8*b +: 8] = wd[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

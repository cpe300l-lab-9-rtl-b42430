// regfile_tb: random writes and reads against a model array; checks that
// $0 stays zero, that writes land on the clock edge only when enabled, and
// that both read ports see the same contents.
module regfile_tb;
  logic        clk = 0, we3;
  logic [4:0]  ra1, ra2, wa3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we3 = 0; ra1 = 0; ra2 = 0; wa3 = 0; wd3 = 0;
    // Fill every register first so the model is known
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we3 = 1; wa3 = 5'(i); wd3 = $urandom;
      model[i] = (i == 0) ? 32'h0 : wd3;
    end
    @(negedge clk);
    we3 = 0;
    repeat (1000) begin
      @(negedge clk);
      we3 = 1'($urandom); wa3 = 5'($urandom); wd3 = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
        failures++;
        $display("ra1=%0d rd1=%h exp %h ra2=%0d rd2=%h exp %h",
                 ra1, rd1, model[ra1], ra2, rd2, model[ra2]);
      end
      @(posedge clk);
      if (we3 && wa3 != 0) model[wa3] = wd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

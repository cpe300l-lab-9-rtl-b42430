// flopr_tb: the program-counter register loads d on each rising edge and
// an asynchronous reset clears it immediately, without waiting for a clock.
module flopr_tb;
  logic        clk = 0, reset;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  flopr #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_q(logic [31:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("%s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    reset = 1; d = 32'hDEAD_BEEF;
    @(negedge clk); expect_q(0, "reset");
    reset = 0;
    repeat (100) begin
      v = $urandom; d = v;
      @(negedge clk); expect_q(v, "load");
    end
    d = 32'h1234_5678;
    #2 reset = 1; #1 expect_q(0, "async reset");
    @(negedge clk); expect_q(0, "held in reset");
    reset = 0;
    @(negedge clk); expect_q(32'h1234_5678, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

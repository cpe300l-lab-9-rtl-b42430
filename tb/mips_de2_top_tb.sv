// mips_de2_top_tb: end-to-end test of the board-level design. Two boards
// run side by side: one with the default test program, one with a
// program using the extended instructions. The testbench reads the
// seven-segment displays back into hex digits and checks, at every store,
// that they show the stored value, the address and the PC. It counts how
// often each mechanism of the processor happened - R-type ALU operation,
// addi, branch taken, branch not taken, jump, word load and store, byte and
// halfword load and store - and fails for any that never occurred.
module mips_de2_top_tb;
  logic        clk = 1, reset;
  logic [6:0]  hex_a [8], hex_b [8];
  logic [17:0] ledr_a, ledr_b;
  logic [31:0] wd_a, da_a, pc_a, wd_b, da_b, pc_b;
  logic        mw_a, mw_b;
  int checks = 0, failures = 0;
  int n_rtype = 0, n_addi = 0, n_taken = 0, n_nottaken = 0, n_jump = 0;
  int n_lw = 0, n_sw = 0, n_lsub = 0, n_ssub = 0;
  int stores_a = 0;

  mips_de2_top board_a (.clk(clk), .reset(reset), .hex(hex_a), .ledr(ledr_a),
                        .writedata(wd_a), .dataadr(da_a), .memwrite(mw_a), .pc(pc_a));
  mips_de2_top #(.MEMFILE("tb/mips_ext_test.hex")) board_b (
    .clk(clk), .reset(reset), .hex(hex_b), .ledr(ledr_b),
    .writedata(wd_b), .dataadr(da_b), .memwrite(mw_b), .pc(pc_b));

  always #5 clk = ~clk;  // starts high: rising edges at 10, 20, 30 ns

  // Seven-segment pattern (active low) back to a hex digit; 16 = not a digit
  function automatic int seg2hex(logic [6:0] s);
    logic [6:0] glyph [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                               7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int d = 0; d < 16; d++) if (glyph[d] == s) return d;
    return 16;
  endfunction

  function automatic logic [31:0] shown(logic [6:0] h [8], int hi, int lo);
    logic [31:0] v = 0;
    for (int i = hi; i >= lo; i--) v = (v << 4) | 32'(seg2hex(h[i]));
    return v;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  // Classify the instruction each board executes this cycle
  task automatic count(logic [31:0] ins, logic taken);
    case (ins[31:26])
      6'h00: if (ins != 0) n_rtype++;
      6'h08: n_addi++;
      6'h04: if (taken) n_taken++; else n_nottaken++;
      6'h02: n_jump++;
      6'h23: n_lw++;
      6'h2B: n_sw++;
      6'h20, 6'h21, 6'h24, 6'h25: n_lsub++;
      6'h28, 6'h29: n_ssub++;
      default: ;
    endcase
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!reset) begin
    count(board_a.cpu.instr, board_a.cpu.mips.c.pcsrc);
    count(board_b.cpu.instr, board_b.cpu.mips.c.pcsrc);
    if (mw_a) begin
      stores_a++;
      chk("store value", wd_a, 32'd7);
      chk("HEX7-6 show store data", shown(hex_a, 7, 6), {24'b0, wd_a[7:0]});
      chk("HEX5-4 show address", shown(hex_a, 5, 4), {24'b0, da_a[7:0]});
      chk("HEX3-0 show pc", shown(hex_a, 3, 0), {16'b0, pc_a[15:0]});
      chk("LEDR0 lights on store", {31'b0, ledr_a[0]}, 32'd1);
      if (da_a == 84) begin
        chk("last store pc", pc_a, 32'h44);
        chk("last store display", shown(hex_a, 7, 0), 32'h0754_0044);
      end
    end
  end

  initial begin
    reset = 1; #22; reset = 0;
    repeat (40) @(posedge clk);
    #1;
    chk("stores by test program", stores_a, 2);
    chk("ext program reached its loop", pc_b, 32'h80);
    chk("ext program lb result", board_b.cpu.dmem.ram[12], 32'hFFFF_FFE0);
    chk("ext program lh result", board_b.cpu.dmem.ram[14], 32'hFFFF_EDCC);
    $display("R-type %0d, addi %0d, branch taken %0d, not taken %0d, jump %0d",
             n_rtype, n_addi, n_taken, n_nottaken, n_jump);
    $display("lw %0d, sw %0d, byte/half loads %0d, byte/half stores %0d",
             n_lw, n_sw, n_lsub, n_ssub);
    checks++; if (n_rtype == 0)    begin failures++; $display("no R-type op");   end
    checks++; if (n_addi == 0)     begin failures++; $display("no addi");        end
    checks++; if (n_taken == 0)    begin failures++; $display("no taken beq");   end
    checks++; if (n_nottaken == 0) begin failures++; $display("no untaken beq"); end
    checks++; if (n_jump == 0)     begin failures++; $display("no jump");        end
    checks++; if (n_lw == 0)       begin failures++; $display("no lw");          end
    checks++; if (n_sw == 0)       begin failures++; $display("no sw");          end
    checks++; if (n_lsub == 0)     begin failures++; $display("no lb/lh");       end
    checks++; if (n_ssub == 0)     begin failures++; $display("no sb/sh");       end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

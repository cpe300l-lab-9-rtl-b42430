// memalign_tb: byte and halfword steering against a byte-addressed model of
// a big-endian word. For stores it applies wdata through byteen to a random
// old word and compares with the model's result; for loads it compares the
// extended value with the bytes the model picks out.
module memalign_tb;
  import mips_pkg::*;

  logic [1:0]  addr;
  memsize_e    memsize;
  logic        memsigned, memwrite;
  logic [31:0] storedata, readword, wdata, loaddata;
  logic [3:0]  byteen;
  int checks = 0, failures = 0;

  memalign dut (.*);

  // Byte k of a word (k = address offset) in big-endian order
  function automatic logic [7:0] byte_at(logic [31:0] w, int k);
    return w[8*(3-k) +: 8];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] old, merged, exp_word, exp_load;
    int n;
    repeat (3000) begin
      n = $urandom_range(2);
      memsize   = memsize_e'(n);
      addr      = 2'($urandom);
      if (memsize == SZ_HALF) addr[0] = 1'b0;
      if (memsize == SZ_WORD) addr = 2'b00;
      memsigned = 1'($urandom);
      memwrite  = 1'($urandom);
      storedata = $urandom;
      readword  = $urandom;
      old       = $urandom;
      #1;
      // Store
      for (int k = 0; k < 4; k++)
        merged[8*k +: 8] = byteen[k] ? wdata[8*k +: 8] : old[8*k +: 8];
      exp_word = old;
      if (memwrite) begin
        case (memsize)
          SZ_BYTE: exp_word[8*(3-int'(addr)) +: 8] = storedata[7:0];
          SZ_HALF: begin
            exp_word[8*(3-int'(addr)) +: 8]   = storedata[15:8];
            exp_word[8*(2-int'(addr)) +: 8]   = storedata[7:0];
          end
          default: exp_word = storedata;
        endcase
      end
      checks++;
      if (merged !== exp_word) begin
        failures++;
        $display("store size=%0d addr=%0d data=%h: got %h expected %h",
                 memsize, addr, storedata, merged, exp_word);
      end
      // Load
      case (memsize)
        SZ_BYTE: exp_load = memsigned ? 32'($signed(byte_at(readword, int'(addr))))
                                      : {24'b0, byte_at(readword, int'(addr))};
        SZ_HALF: exp_load = memsigned
                   ? 32'($signed({byte_at(readword, int'(addr)), byte_at(readword, int'(addr) + 1)}))
                   : {16'b0, byte_at(readword, int'(addr)), byte_at(readword, int'(addr) + 1)};
        default: exp_load = readword;
      endcase
      checks++;
      if (loaddata !== exp_load) begin
        failures++;
        $display("load size=%0d addr=%0d signed=%b word=%h: got %h expected %h",
                 memsize, addr, memsigned, readword, loaddata, exp_load);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

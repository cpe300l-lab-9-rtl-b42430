// memalign: byte and halfword steering between the datapath and data memory.
//
// Combinational. The data memory is organised as 32-bit words with one write
// enable per byte lane. Memory is big-endian, as MIPS is by default: the byte
// at word offset 0 sits in bits 31:24. For a store, the low byte (sb) or low
// halfword (sh) of the register is copied into every lane it could go to and
// only the addressed lanes are enabled; sw enables all four. For a load, the
// addressed byte (lb, lbu) or halfword (lh, lhu) is picked out of the word
// read and sign- or zero-extended; lw passes the word through.
// The instruction list comes from the reference design; the byte order and the handling
// of misaligned addresses (low address bits below the access size are
// ignored, no exception) are this design's choices.
module memalign
  import mips_pkg::*;
(
  input  logic [1:0]  addr,       // byte offset within the word
  input  memsize_e    memsize,
  input  logic        memsigned,
  input  logic        memwrite,
  input  logic [31:0] storedata,  // rt register value
  input  logic [31:0] readword,   // word read from data memory
  output logic [31:0] wdata,      // lane-steered store data
  output logic [3:0]  byteen,     // write enable per lane, bit 3 = bits 31:24
  output logic [31:0] loaddata    // extended load result
);

  logic [7:0]  lbyte;
  logic [15:0] lhalf;

  // Stores
  always_comb begin
    unique case (memsize)
      SZ_BYTE: begin
        wdata  = {4{storedata[7:0]}};
        byteen = 4'b1000 >> addr;
      end
      SZ_HALF: begin
        wdata  = {2{storedata[15:0]}};
        byteen = addr[1] ? 4'b0011 : 4'b1100;
      end
      default: begin
        wdata  = storedata;
        byteen = 4'b1111;
      end
    endcase
    if (!memwrite) byteen = 4'b0000;
  end

  // Loads
  always_comb begin
    unique case (addr)
      2'd0:    lbyte = readword[31:24];
      2'd1:    lbyte = readword[23:16];
      2'd2:    lbyte = readword[15:8];
      default: lbyte = readword[7:0];
    endcase
    lhalf = addr[1] ? readword[15:0] : readword[31:16];
    unique case (memsize)
      SZ_BYTE: loaddata = {{24{memsigned & lbyte[7]}}, lbyte};
      SZ_HALF: loaddata = {{16{memsigned & lhalf[15]}}, lhalf};
      default: loaddata = readword;
    endcase
  end

endmodule

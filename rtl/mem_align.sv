// mem_align: byte/half-word/word lane logic of the MEM stage.
//
// Sits between the pipeline and the word-wide data memory.  For a store it
// turns the access width and the low address bits into byte enables and
// copies the store data onto the byte lanes being written.  For a load it
// picks the addressed byte or half word out of the memory word and sign- or
// zero-extends it.  LWL/LWR/SWL/SWR move the part of an unaligned word that
// lies in the addressed memory word: with k = address bits 1:0, LWL/SWL
// cover memory bytes 0..k and register bytes 3-k..3, LWR/SWR memory bytes
// k..3 and register bytes 0..3-k.  For LWL/LWR the register bytes not covered
// keep the old rt value, which arrives on st_data.  Combinational.
// Byte order is little-endian (byte 0 of a word in bits 7:0) and the low
// address bits below the access width are ignored (no alignment exception);
// both are this design's choices.  The LWL/LWR/SWL/SWR byte mapping is the
// standard little-endian MIPS one.
module mem_align
  import mips_pkg::*;
(
  input  logic [1:0] addr_lo,      // address bits 1:0
  input  mem_size_e  size,
  input  logic       ld_unsigned,
  input  word_t      st_data,      // register value to store (old rt for LWL/LWR)
  output logic [3:0] be,           // byte enables for a store
  output word_t      wdata,        // store data on its byte lanes
  input  word_t      mem_word,     // word read from memory
  output word_t      ld_data       // aligned, extended load result
);

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;
  logic [4:0]  sh_l, sh_r;         // 8*(3-k) and 8*k

  assign sh_l = {~addr_lo, 3'b000};
  assign sh_r = {addr_lo, 3'b000};

  always_comb begin
    unique case (size)
      MEM_B:   begin be = 4'b0001 << addr_lo;            wdata = {4{st_data[7:0]}};  end
      MEM_H:   begin be = addr_lo[1] ? 4'b1100 : 4'b0011; wdata = {2{st_data[15:0]}}; end
      MEM_WL:  begin be = 4'b1111 >> ~addr_lo;            wdata = st_data >> sh_l;    end
      MEM_WR:  begin be = 4'b1111 << addr_lo;             wdata = st_data << sh_r;    end
      default: begin be = 4'b1111;                        wdata = st_data;            end
    endcase
  end

  assign byte_sel = mem_word[8*addr_lo +: 8];
  assign half_sel = addr_lo[1] ? mem_word[31:16] : mem_word[15:0];

  always_comb begin
    unique case (size)
      MEM_B:   ld_data = {{24{~ld_unsigned & byte_sel[7]}}, byte_sel};
      MEM_H:   ld_data = {{16{~ld_unsigned & half_sel[15]}}, half_sel};
      MEM_WL:  ld_data = (mem_word << sh_l) | (st_data & ~(32'hFFFF_FFFF << sh_l));
      MEM_WR:  ld_data = (mem_word >> sh_r) | (st_data & ~(32'hFFFF_FFFF >> sh_r));
      default: ld_data = mem_word;
    endcase
  end

endmodule

// dmem: data memory of the MEM stage.
//
// WORDS 32-bit words.  The read is combinational at the byte address addr
// (low two bits ignored: the word holding the addressed byte is returned); a
// store writes the byte lanes of wdata selected by be on the rising edge when
// we is 1 (mem_align produces be and the lane-aligned data).  A second, load/debug port
// (ld_we/ld_addr/ld_wdata/dbg_rdata) lets a testbench preload and inspect the
// contents.  Addresses past the end wrap around.  Contents are not reset.
module dmem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rdata,
  input  logic  we,
  input  logic [3:0] be,
  input  word_t wdata,
  input  logic  ld_we,
  input  word_t ld_addr,
  input  word_t ld_wdata,
  output word_t dbg_rdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  logic [AW-1:0] idx, ld_idx;
  assign idx    = AW'(addr >> 2);
  assign ld_idx = AW'(ld_addr >> 2);

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[idx][8*i +: 8] <= wdata[8*i +: 8];
    end
    else if (ld_we) mem[ld_idx] <= ld_wdata;
  end

  assign rdata     = mem[idx];
  assign dbg_rdata = mem[ld_idx];

endmodule

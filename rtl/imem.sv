// imem: instruction memory of the IF stage.
//
// WORDS 32-bit words read combinationally at the byte address addr (the low
// two bits are ignored, so fetches are word aligned).  Addresses past the end
// wrap around.  A write port (we/waddr/wdata, rising edge) loads a program;
// the pipeline itself never writes it.  Contents are not reset.
module imem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rdata,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  word_t mem [WORDS];

  logic [AW-1:0] ridx, widx;
  assign ridx = AW'(addr >> 2);
  assign widx = AW'(waddr >> 2);

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[ridx];

endmodule

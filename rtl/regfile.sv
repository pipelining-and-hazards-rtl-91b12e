// regfile: the register file read in ID and written in WB.
//
// NREGS registers of 32 bits; register 0 always reads as zero and ignores
// writes.  Two combinational read ports (ra/rb) and one write port written on
// the rising clock edge.  With BYPASS = 1 a read of the register being
// written in the same cycle returns the value being written, so an instruction
// in ID sees the result of the instruction in WB without waiting a cycle (the
// "register file bypass", WB to ID).  The alternative of clocking the file on
// the opposite edge is not used.  A third read port (dbg) lets a testbench or
// a debugger inspect the architectural state.  rst clears every register.
module regfile
  import mips_pkg::*;
#(
  parameter int unsigned NREGS  = 32,
  parameter bit          BYPASS = 1'b1
) (
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t ra,
  input  reg_idx_t rb,
  output word_t    a,
  output word_t    b,
  input  logic     we,
  input  reg_idx_t wd,
  input  word_t    wdata,
  input  reg_idx_t dbg_addr,
  output word_t    dbg_data,
  output logic     bypass_a,   // port A took the value being written
  output logic     bypass_b
);

  word_t regs [NREGS];

  logic wr_en;
  assign wr_en = we && (wd != '0) && (32'(wd) < NREGS);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wd] <= wdata;
    end
  end

  function automatic word_t rd_port(reg_idx_t r);
    return (r == '0 || 32'(r) >= NREGS) ? '0 : regs[r];
  endfunction

  assign bypass_a = BYPASS && wr_en && (wd == ra);
  assign bypass_b = BYPASS && wr_en && (wd == rb);

  assign a = bypass_a ? wdata : rd_port(ra);
  assign b = bypass_b ? wdata : rd_port(rb);
  assign dbg_data = rd_port(dbg_addr);

endmodule

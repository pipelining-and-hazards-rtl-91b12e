// pc_unit: program counter of the IF stage.
//
// Holds the address of the instruction being fetched and produces pc4 =
// pc + 4.  On each rising edge the PC loads pc + 4 unless en is 0, which is
// how a stall "prevents the PC update" so the IF-stage instruction is fetched
// again.  A taken branch or jump (redirect, from EX) loads target instead and
// wins over the stall hold.  Synchronous reset to RESET_PC.
module pc_unit
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  redirect,
  input  word_t target,
  output word_t pc,
  output word_t pc4
);

  assign pc4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (rst)           pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (en)       pc <= pc4;
  end

endmodule

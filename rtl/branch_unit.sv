// branch_unit: branch and jump resolution in EX.
//
// Takes the branch kind of the instruction in EX with its forwarded rs (a)
// and rt (b) values, and gives whether control leaves the sequential path
// (taken) and where it goes (target):
//   BEQ/BNE compare rs with rt; BLEZ/BGTZ/BLTZ/BGEZ test the sign of rs;
//   branch target = PC+4 + (sign-extended offset << 2);
//   J/JAL target   = {PC+4[31:28], 26-bit index, 00};
//   JR/JALR target = rs.
// For the "likely" branches (BEQL ...) annul is raised when the branch is not
// taken: the instruction in the delay slot, then in ID, must be discarded.
// Combinational.  The encodings and target formulas are the MIPS ones; doing
// the comparison and target in EX (where the pipelined datapath computes
// branch targets) with the MIPS one-instruction delay slot is this design's
// choice of how to resolve control flow.
module branch_unit
  import mips_pkg::*;
(
  input  br_e         br,
  input  logic        likely,
  input  word_t       a,
  input  word_t       b,
  input  word_t       pc4,
  input  word_t       imm,      // sign-extended 16-bit offset
  input  logic [25:0] jidx,
  output logic        taken,
  output logic        annul,
  output word_t       target
);

  logic cond;

  always_comb begin
    unique case (br)
      BR_EQ:   cond = (a == b);
      BR_NE:   cond = (a != b);
      BR_LEZ:  cond = a[31] || (a == '0);
      BR_GTZ:  cond = !a[31] && (a != '0);
      BR_LTZ:  cond = a[31];
      BR_GEZ:  cond = !a[31];
      BR_J, BR_JR: cond = 1'b1;
      default: cond = 1'b0;
    endcase
  end

  assign taken = cond;
  assign annul = likely && (br != BR_NONE) && !cond;

  always_comb begin
    unique case (br)
      BR_J:    target = {pc4[31:28], jidx, 2'b00};
      BR_JR:   target = a;
      default: target = pc4 + (imm << 2);
    endcase
  end

endmodule

// forward_unit: operand forwarding (bypass) selection in the EX stage.
//
// For each ALU operand register of the instruction in ID/EX it chooses where
// the value comes from:
//   FWD_EXM  if EX/MEM writes a register (WE), that register is not 0 and it
//            equals the operand register (M -> Ex);
//   FWD_WB   otherwise, if MEM/WB writes the operand register (not 0)
//            (W -> Ex, the final write-back value);
//   FWD_REG  otherwise: the value read from the register file in ID.
// The EX/MEM match has priority because it holds the newer result.
// Combinational.
module forward_unit
  import mips_pkg::*;
(
  input  reg_idx_t idex_ra,
  input  reg_idx_t idex_rb,
  input  reg_idx_t exm_rd,
  input  logic     exm_we,
  input  reg_idx_t mw_rd,
  input  logic     mw_we,
  output fwd_sel_e sel_a,
  output fwd_sel_e sel_b
);

  function automatic fwd_sel_e pick(reg_idx_t r);
    if (exm_we && exm_rd != '0 && r == exm_rd) return FWD_EXM;
    if (mw_we  && mw_rd  != '0 && r == mw_rd)  return FWD_WB;
    return FWD_REG;
  endfunction

  assign sel_a = pick(idex_ra);
  assign sel_b = pick(idex_rb);

endmodule

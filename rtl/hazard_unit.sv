// hazard_unit: data-hazard detection in the ID stage.
//
// Compares the source registers of the instruction in IF/ID (Ra = rs,
// Rb = rt, each only if the instruction reads it, and never register 0) with
// the destinations of older instructions that will write the register file.
// When it asserts stall, the datapath holds the PC and IF/ID and turns the
// ID/EX input into a bubble.  Combinational.
//
//  FORWARD = 0: stall while the result is anywhere between ID/EX and EX/MEM
//               (and in MEM/WB too when RF_BYPASS = 0), i.e. until the
//               register file can deliver it.
//  FORWARD = 1: the forwarding unit covers every case except a load whose
//               data is not there yet: stall one cycle when the instruction
//               in ID/EX is a load that writes one of the needed registers.
//               Without RF_BYPASS the MEM/WB case still stalls, because the
//               value would be read in ID while WB writes it and have left
//               the pipeline by the time the instruction reaches EX.
// Comparisons are qualified with the producer's RegWr so stores and bubbles
// never cause a stall; that qualification is this design's choice.
module hazard_unit
  import mips_pkg::*;
#(
  parameter bit FORWARD   = 1'b1,
  parameter bit RF_BYPASS = 1'b1
) (
  input  reg_idx_t id_ra,
  input  reg_idx_t id_rb,
  input  logic     id_uses_ra,
  input  logic     id_uses_rb,
  input  reg_idx_t idex_rd,
  input  logic     idex_we,
  input  logic     idex_mem_rd,
  input  reg_idx_t exm_rd,
  input  logic     exm_we,
  input  reg_idx_t mw_rd,
  input  logic     mw_we,
  output logic     stall
);

  function automatic logic src_hazard(reg_idx_t r);
    logic h;
    if (r == '0) return 1'b0;
    if (FORWARD) h = idex_we && idex_mem_rd && (r == idex_rd);
    else         h = (idex_we && (r == idex_rd)) || (exm_we && (r == exm_rd));
    if (!RF_BYPASS) h = h || (mw_we && (r == mw_rd));
    return h;
  endfunction

  assign stall = (id_uses_ra && src_hazard(id_ra)) ||
                 (id_uses_rb && src_hazard(id_rb));

endmodule

// control: instruction decoder of the ID stage.
//
// Translates the opcode (and, for R-type, the funct field) of the instruction
// held in IF/ID into the control bundle ctrl_t and picks the destination
// register: rd (bits 15:11) for R-type, rt (bits 20:16) for I-type.  It also
// says which source registers the instruction really reads and, for loads
// and stores, the access width and whether a load zero-extends, so the hazard
// unit does not stall on a field that is not an operand.
// Supported: ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLL SRL SRA SLLV SRLV
// SRAV, MULT MULTU DIV DIVU MFHI MFLO MTHI MTLO, ADDI ADDIU SLTI SLTIU ANDI
// ORI XORI LUI, LB LH LW LBU LHU LWL LWR, SB SH SW SWL SWR, J JAL JR JALR,
// BEQ BNE BLEZ BGTZ BLTZ BGEZ and BEQL BNEL BLEZL BGTZL, LL SC, SYNC (a nop
// here).  JAL links in r31; SC is marked as a load because its result is
// produced in MEM.
// Any other encoding decodes to a nop (no register or memory write).
// MULT/DIV/MTHI/MTLO write no general register; MFHI/MFLO read none.
// The shamt field (bits 10:6) is not read here: the ID stage takes it
// straight from the instruction into ID/EX.  The instruction list is the
// MIPS set this pipeline is built for; the encodings are the standard MIPS32
// ones, and the ctrl_t fields are this design's own.
// Combinational.
module control
  import mips_pkg::*;
(
  input  word_t    inst,
  output ctrl_t    ctrl,
  output reg_idx_t ra,
  output reg_idx_t rb,
  output reg_idx_t dest
);

  logic [5:0] op, fn;
  assign op = inst[31:26];
  assign fn = inst[5:0];
  assign ra = inst[25:21];
  assign rb = inst[20:16];

  logic dest_is_rd;

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    dest_is_rd = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        dest_is_rd   = 1'b1;
        ctrl.reg_we  = 1'b1;
        ctrl.uses_ra = 1'b1;
        ctrl.uses_rb = 1'b1;
        unique case (fn)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_SLL, FN_SRL, FN_SRA: begin
            ctrl.alu_op     = (fn == FN_SLL) ? ALU_SLL : (fn == FN_SRL) ? ALU_SRL : ALU_SRA;
            ctrl.a_is_shamt = 1'b1;
            ctrl.uses_ra    = 1'b0;
          end
          FN_JR: begin
            ctrl.br      = BR_JR;
            ctrl.reg_we  = 1'b0;
            ctrl.uses_rb = 1'b0;
          end
          FN_JALR: begin
            ctrl.br      = BR_JR;
            ctrl.link    = 1'b1;
            ctrl.uses_rb = 1'b0;
          end
          FN_SYNC: begin
            // memory is strongly ordered here: SYNC has nothing to wait for
            ctrl.reg_we  = 1'b0;
            ctrl.uses_ra = 1'b0;
            ctrl.uses_rb = 1'b0;
          end
          FN_MULT:  begin ctrl.md_op = MD_MULT;  ctrl.reg_we = 1'b0; end
          FN_MULTU: begin ctrl.md_op = MD_MULTU; ctrl.reg_we = 1'b0; end
          FN_DIV:   begin ctrl.md_op = MD_DIV;   ctrl.reg_we = 1'b0; end
          FN_DIVU:  begin ctrl.md_op = MD_DIVU;  ctrl.reg_we = 1'b0; end
          FN_MTHI, FN_MTLO: begin
            ctrl.md_op   = (fn == FN_MTHI) ? MD_MTHI : MD_MTLO;
            ctrl.reg_we  = 1'b0;
            ctrl.uses_rb = 1'b0;
          end
          FN_MFHI, FN_MFLO: begin
            ctrl.mf_hi   = (fn == FN_MFHI);
            ctrl.mf_lo   = (fn == FN_MFLO);
            ctrl.uses_ra = 1'b0;
            ctrl.uses_rb = 1'b0;
          end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          default: begin
            ctrl.reg_we  = 1'b0;
            ctrl.uses_ra = 1'b0;
            ctrl.uses_rb = 1'b0;
          end
        endcase
      end
      OP_J: ctrl.br = BR_J;
      OP_JAL: begin
        ctrl.br = BR_J;  ctrl.link = 1'b1;  ctrl.reg_we = 1'b1;
      end
      OP_BEQ, OP_BNE, OP_BEQL, OP_BNEL: begin
        ctrl.br        = (op == OP_BEQ || op == OP_BEQL) ? BR_EQ : BR_NE;
        ctrl.br_likely = (op == OP_BEQL || op == OP_BNEL);
        ctrl.sign_ext  = 1'b1;
        ctrl.uses_ra   = 1'b1;  ctrl.uses_rb = 1'b1;
      end
      OP_BLEZ, OP_BGTZ, OP_BLEZL, OP_BGTZL: begin
        ctrl.br        = (op == OP_BLEZ || op == OP_BLEZL) ? BR_LEZ : BR_GTZ;
        ctrl.br_likely = (op == OP_BLEZL || op == OP_BGTZL);
        ctrl.sign_ext  = 1'b1;
        ctrl.uses_ra   = 1'b1;
      end
      OP_REGIMM: begin
        if (inst[20:16] == RT_BLTZ || inst[20:16] == RT_BGEZ) begin
          ctrl.br       = (inst[20:16] == RT_BLTZ) ? BR_LTZ : BR_GEZ;
          ctrl.sign_ext = 1'b1;
          ctrl.uses_ra  = 1'b1;
        end
      end
      OP_ADDI, OP_ADDIU: begin
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_SLTI: begin
        ctrl.alu_op = ALU_SLT;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_SLTIU: begin
        ctrl.alu_op = ALU_SLTU; ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_ANDI: begin
        ctrl.alu_op = ALU_AND;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_ORI: begin
        ctrl.alu_op = ALU_OR;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_XORI: begin
        ctrl.alu_op = ALU_XOR;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.uses_ra = 1'b1;
      end
      OP_LUI: begin
        ctrl.alu_op = ALU_LUI;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1;
      end
      OP_LL: begin
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.mem_rd = 1'b1;
        ctrl.uses_ra = 1'b1;    ctrl.mem_size = MEM_W; ctrl.ll = 1'b1;
      end
      OP_SC: begin
        // the success flag is known only in MEM, so SC writes rt like a load
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.mem_wr = 1'b1;
        ctrl.reg_we = 1'b1;     ctrl.mem_rd = 1'b1;
        ctrl.uses_ra = 1'b1;    ctrl.uses_rb = 1'b1;
        ctrl.mem_size = MEM_W;  ctrl.sc = 1'b1;
      end
      OP_LWL, OP_LWR: begin
        // partial-word loads merge into the old rt, so rt is also a source
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.mem_rd = 1'b1;
        ctrl.uses_ra = 1'b1;    ctrl.uses_rb = 1'b1;
        ctrl.mem_size = (op == OP_LWL) ? MEM_WL : MEM_WR;
      end
      OP_SWL, OP_SWR: begin
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.mem_wr = 1'b1;
        ctrl.uses_ra = 1'b1;    ctrl.uses_rb = 1'b1;
        ctrl.mem_size = (op == OP_SWL) ? MEM_WL : MEM_WR;
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.reg_we = 1'b1; ctrl.mem_rd = 1'b1;
        ctrl.uses_ra = 1'b1;
        ctrl.mem_size    = (op == OP_LW) ? MEM_W : (op == OP_LH || op == OP_LHU) ? MEM_H : MEM_B;
        ctrl.ld_unsigned = (op == OP_LBU || op == OP_LHU);
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.alu_op = ALU_ADD;  ctrl.sign_ext = 1'b1;
        ctrl.alu_src_imm = 1'b1; ctrl.mem_wr = 1'b1;
        ctrl.uses_ra = 1'b1;    ctrl.uses_rb = 1'b1;
        ctrl.mem_size = (op == OP_SW) ? MEM_W : (op == OP_SH) ? MEM_H : MEM_B;
      end
      default: ;
    endcase
  end

  assign dest = (op == OP_JAL) ? 5'd31 : dest_is_rd ? inst[15:11] : inst[20:16];

endmodule

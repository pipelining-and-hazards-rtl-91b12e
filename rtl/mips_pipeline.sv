// mips_pipeline: five-stage pipelined MIPS-subset processor with data-hazard
// handling by stalling, forwarding and a register-file bypass.
//
// Stages, each one clock cycle, separated by the pipeline registers IF/ID,
// ID/EX, EX/MEM and MEM/WB:
//   IF   fetch the instruction at PC from imem, PC <= PC + 4
//   ID   decode (control, extend), read rs/rt from the register file, detect
//        hazards (hazard_unit)
//   EX   pick operands (forward_unit: register value, EX/MEM.D or the WB
//        value), ALU operation; MULT/DIV/MTHI/MTLO write the HI/LO pair
//        (hilo_unit) and MFHI/MFLO take it as their result; branches and
//        jumps are resolved (branch_unit)
//   MEM  load/store access to dmem at the ALU result (mem_align handles
//        byte, half-word and LWL/LWR/SWL/SWR lanes); the LL/SC link bit
//        lives here
//   WB   write the ALU result or the loaded word to the register file
// Register reads happen in ID and writes in WB, so a dependent instruction can
// need a value that is still in flight.  The forwarding paths M->Ex and W->Ex
// deliver it to EX; the register-file bypass delivers a value that WB is
// writing to ID in the same cycle.  The one case they cannot cover, a load
// followed directly by a user of its result, stalls for one cycle: the PC and
// IF/ID hold and a bubble (RegWr = 0, MemWr = 0) enters ID/EX.  With
// FORWARD = 0 the design falls back to stalling until the register file has
// the value (3 bubbles for back-to-back dependent instructions when
// RF_BYPASS = 0, 2 with it).
//
// Control flow follows MIPS with one branch delay slot.  A branch or jump is
// resolved in EX, when its delay slot is in ID and the next sequential
// instruction is in IF: if taken, the PC loads the target and the IF
// instruction is discarded (IF/ID cleared), costing one cycle; if the delay
// slot is stalled at that moment it stays in IF/ID and the stall absorbs the
// discard.  A not-taken likely branch (BEQL ...) turns its delay slot into a
// bubble instead.  squash reports either discard.  Resolving in EX with a
// delay slot is this design's choice; the hazard scheme above covers only
// data hazards.  Memories are loaded through the ld_* port, normally
// while rst is held; dbg_* ports read registers and data memory.
// Event outputs (stall, fwd_sel_a/b, rf_bypass, retire_*) expose what the
// pipeline did in the current cycle for performance counting and tests.
// Latency: an instruction fetched in cycle n writes back in cycle n+4; with no
// stalls one instruction retires per cycle.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned NREGS      = 32,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  parameter bit          FORWARD    = 1'b1,
  parameter bit          RF_BYPASS  = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // memory loading
  input  logic        ld_imem_we,
  input  logic        ld_dmem_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  // debug read ports
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  output logic [31:0] dbg_dmem_data,   // data memory word at ld_addr
  // per-cycle events
  output logic        stall,
  output logic        squash,          // a fetched instruction was discarded
  output logic [1:0]  fwd_sel_a,
  output logic [1:0]  fwd_sel_b,
  output logic        rf_bypass,
  output logic        retire_valid,
  output logic [31:0] retire_pc
);

  // ---------------------------------------------------------------- IF
  word_t pc, pc4, inst_f;
  ifid_t ifid_d, ifid_q;

  logic  hz_stall, br_taken, br_annul;
  word_t br_target;

  // A not-taken likely branch discards its delay slot, which is then in ID,
  // so a stall of that instruction no longer matters.
  assign stall  = hz_stall && !br_annul;
  assign squash = (br_taken && !stall) || br_annul;

  pc_unit u_pc (
    .clk, .rst, .en(!stall), .redirect(br_taken), .target(br_target), .pc, .pc4
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .rdata(inst_f),
    .we(ld_imem_we), .waddr(ld_addr), .wdata(ld_data)
  );

  assign ifid_d = '{valid: 1'b1, pc4: pc4, inst: inst_f};

  // a taken branch in EX discards the instruction fetched after its delay
  // slot; if the delay slot is stalled in ID it stays there instead
  pipe_reg #(.T(ifid_t)) u_ifid (
    .clk, .rst, .en(!stall), .clr(br_taken && !stall), .d(ifid_d), .q(ifid_q)
  );

  // ---------------------------------------------------------------- ID
  ctrl_t    ctrl_id;
  reg_idx_t ra_id, rb_id, dest_id;
  word_t    imm_id, a_id, b_id;
  idex_t    idex_d, idex_q;
  exmem_t   exm_d, exm_q;
  memwb_t   mw_d, mw_q;
  word_t    wb_data;
  logic     byp_a, byp_b;

  control u_ctrl (
    .inst(ifid_q.inst), .ctrl(ctrl_id), .ra(ra_id), .rb(rb_id), .dest(dest_id)
  );

  extend u_ext (
    .imm16(ifid_q.inst[15:0]), .sign_ext(ctrl_id.sign_ext), .imm32(imm_id)
  );

  regfile #(.NREGS(NREGS), .BYPASS(RF_BYPASS)) u_rf (
    .clk, .rst,
    .ra(ra_id), .rb(rb_id), .a(a_id), .b(b_id),
    .we(mw_q.reg_we), .wd(mw_q.rd), .wdata(wb_data),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data),
    .bypass_a(byp_a), .bypass_b(byp_b)
  );

  hazard_unit #(.FORWARD(FORWARD), .RF_BYPASS(RF_BYPASS)) u_hz (
    .id_ra(ra_id), .id_rb(rb_id),
    .id_uses_ra(ifid_q.valid && ctrl_id.uses_ra),
    .id_uses_rb(ifid_q.valid && ctrl_id.uses_rb),
    .idex_rd(idex_q.rd), .idex_we(idex_q.ctrl.reg_we), .idex_mem_rd(idex_q.ctrl.mem_rd),
    .exm_rd(exm_q.rd), .exm_we(exm_q.reg_we),
    .mw_rd(mw_q.rd), .mw_we(mw_q.reg_we),
    .stall(hz_stall)
  );

  assign rf_bypass = ifid_q.valid && ((ctrl_id.uses_ra && byp_a) || (ctrl_id.uses_rb && byp_b));

  always_comb begin
    idex_d       = '0;
    idex_d.valid = ifid_q.valid;
    idex_d.pc4   = ifid_q.pc4;
    idex_d.ctrl  = ifid_q.valid ? ctrl_id : '0;
    idex_d.val_a = a_id;
    idex_d.val_b = b_id;
    idex_d.imm   = imm_id;
    idex_d.shamt = ifid_q.inst[10:6];
    idex_d.jidx  = ifid_q.inst[25:0];
    idex_d.ra    = ctrl_id.uses_ra ? ra_id : '0;
    idex_d.rb    = ctrl_id.uses_rb ? rb_id : '0;
    idex_d.rd    = dest_id;
  end

  // stall: the instruction in ID stays in IF/ID, a bubble goes down the pipe;
  // annul: the delay slot of a not-taken likely branch becomes a bubble
  pipe_reg #(.T(idex_t)) u_idex (
    .clk, .rst, .en(1'b1), .clr(stall || br_annul), .d(idex_d), .q(idex_q)
  );

  // ---------------------------------------------------------------- EX
  fwd_sel_e sel_a, sel_b;
  word_t    fa, fb, alu_a, alu_b, alu_y, hi, lo, ex_y;

  if (FORWARD) begin : g_fwd
    forward_unit u_fwd (
      .idex_ra(idex_q.ra), .idex_rb(idex_q.rb),
      .exm_rd(exm_q.rd), .exm_we(exm_q.reg_we),
      .mw_rd(mw_q.rd), .mw_we(mw_q.reg_we),
      .sel_a, .sel_b
    );
  end else begin : g_nofwd
    assign sel_a = FWD_REG;
    assign sel_b = FWD_REG;
  end

  always_comb begin
    unique case (sel_a)
      FWD_EXM: fa = exm_q.d;
      FWD_WB:  fa = wb_data;
      default: fa = idex_q.val_a;
    endcase
    unique case (sel_b)
      FWD_EXM: fb = exm_q.d;
      FWD_WB:  fb = wb_data;
      default: fb = idex_q.val_b;
    endcase
  end

  assign alu_a = idex_q.ctrl.a_is_shamt  ? word_t'(idex_q.shamt) : fa;
  assign alu_b = idex_q.ctrl.alu_src_imm ? idex_q.imm            : fb;

  alu u_alu (.op(idex_q.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  hilo_unit u_hilo (
    .clk, .rst, .op(idex_q.ctrl.md_op), .a(fa), .b(fb), .hi, .lo
  );

  branch_unit u_br (
    .br(idex_q.ctrl.br), .likely(idex_q.ctrl.br_likely), .a(fa), .b(fb),
    .pc4(idex_q.pc4), .imm(idex_q.imm), .jidx(idex_q.jidx),
    .taken(br_taken), .annul(br_annul), .target(br_target)
  );

  assign ex_y = idex_q.ctrl.link  ? idex_q.pc4 + 32'd4 :
                idex_q.ctrl.mf_hi ? hi :
                idex_q.ctrl.mf_lo ? lo : alu_y;

  assign exm_d = '{valid:  idex_q.valid,
                   pc4:    idex_q.pc4,
                   reg_we: idex_q.ctrl.reg_we,
                   mem_rd: idex_q.ctrl.mem_rd,
                   mem_wr: idex_q.ctrl.mem_wr,
                   mem_size: idex_q.ctrl.mem_size,
                   ld_unsigned: idex_q.ctrl.ld_unsigned,
                   ll:     idex_q.ctrl.ll,
                   sc:     idex_q.ctrl.sc,
                   d:      ex_y,
                   b:      fb,
                   rd:     idex_q.rd};

  pipe_reg #(.T(exmem_t)) u_exm (
    .clk, .rst, .en(1'b1), .clr(1'b0), .d(exm_d), .q(exm_q)
  );

  // ---------------------------------------------------------------- MEM
  word_t      mem_word, mem_wlanes, mem_rdata;
  logic [3:0] mem_be;
  logic       llbit, mem_we;

  // Link bit of LL/SC: set by LL, cleared by SC.  SC stores only while it is
  // set and returns it in rt.  With one processor and no exceptions nothing
  // else can clear it.
  always_ff @(posedge clk) begin
    if (rst)            llbit <= 1'b0;
    else if (exm_q.ll)  llbit <= 1'b1;
    else if (exm_q.sc)  llbit <= 1'b0;
  end

  assign mem_we = exm_q.mem_wr && (!exm_q.sc || llbit);

  mem_align u_align (
    .addr_lo(exm_q.d[1:0]), .size(exm_q.mem_size), .ld_unsigned(exm_q.ld_unsigned),
    .st_data(exm_q.b), .be(mem_be), .wdata(mem_wlanes),
    .mem_word, .ld_data(mem_rdata)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(exm_q.d), .rdata(mem_word),
    .we(mem_we), .be(mem_be), .wdata(mem_wlanes),
    .ld_we(ld_dmem_we), .ld_addr(ld_addr), .ld_wdata(ld_data),
    .dbg_rdata(dbg_dmem_data)
  );

  assign mw_d = '{valid:  exm_q.valid,
                  pc4:    exm_q.pc4,
                  reg_we: exm_q.reg_we,
                  mem_rd: exm_q.mem_rd,
                  d:      exm_q.d,
                  m:      exm_q.sc ? word_t'(llbit) : mem_rdata,
                  rd:     exm_q.rd};

  pipe_reg #(.T(memwb_t)) u_mw (
    .clk, .rst, .en(1'b1), .clr(1'b0), .d(mw_d), .q(mw_q)
  );

  // ---------------------------------------------------------------- WB
  assign wb_data = mw_q.mem_rd ? mw_q.m : mw_q.d;

  // ---------------------------------------------------------------- events
  assign fwd_sel_a    = sel_a;
  assign fwd_sel_b    = sel_b;
  assign retire_valid = mw_q.valid;
  assign retire_pc    = mw_q.pc4 - 32'd4;

endmodule

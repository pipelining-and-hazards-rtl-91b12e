// mips_pkg: shared types and constants of the five-stage MIPS-subset pipeline.
//
// The instruction fields follow the MIPS R-type and I-type formats
// (op[31:26], rs[25:21], rt[20:16], rd[15:11], shamt[10:6], funct[5:0],
// immediate[15:0]).  Opcode and funct numbers are the standard MIPS32
// encodings.  The pipeline-register structs carry what each stage boundary
// needs; in every one of them the all-zero value is a bubble (valid = 0 and
// no register or memory write), so clearing a pipeline register inserts a nop.
// The ALU operation encoding and the struct layouts are this design's own.
package mips_pkg;

  localparam int XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Opcodes (bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;  // BLTZ/BGEZ, chosen by rt
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_BEQL  = 6'h14;
  localparam logic [5:0] OP_BNEL  = 6'h15;
  localparam logic [5:0] OP_BLEZL = 6'h16;
  localparam logic [5:0] OP_BGTZL = 6'h17;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LH    = 6'h21;
  localparam logic [5:0] OP_LWL   = 6'h22;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_LWR   = 6'h26;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SWL   = 6'h2A;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_SWR   = 6'h2E;
  localparam logic [5:0] OP_LL    = 6'h30;
  localparam logic [5:0] OP_SC    = 6'h38;

  // R-type function codes (bits 5:0)
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_SYNC  = 6'h0F;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MTHI  = 6'h11;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MTLO  = 6'h13;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_DIV   = 6'h1A;
  localparam logic [5:0] FN_DIVU  = 6'h1B;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;

  // ALU operations.  Shifts shift operand B by a[4:0].
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10,
    ALU_LUI  = 4'd11
  } alu_op_e;

  // Operations that write the HI/LO register pair (in EX)
  typedef enum logic [2:0] {
    MD_NONE  = 3'd0,
    MD_MULT  = 3'd1,       // {HI,LO} = signed rs * rt
    MD_MULTU = 3'd2,       // {HI,LO} = unsigned rs * rt
    MD_DIV   = 3'd3,       // LO = rs / rt, HI = rs % rt, signed
    MD_DIVU  = 3'd4,       // the same, unsigned
    MD_MTHI  = 3'd5,       // HI = rs
    MD_MTLO  = 3'd6        // LO = rs
  } md_op_e;

  // REGIMM rt codes
  localparam logic [4:0] RT_BLTZ = 5'h00;
  localparam logic [4:0] RT_BGEZ = 5'h01;

  // Branch and jump kinds, resolved in EX
  typedef enum logic [3:0] {
    BR_NONE = 4'd0,
    BR_EQ   = 4'd1,        // rs == rt
    BR_NE   = 4'd2,        // rs != rt
    BR_LEZ  = 4'd3,        // rs <= 0 (signed)
    BR_GTZ  = 4'd4,        // rs >  0
    BR_LTZ  = 4'd5,        // rs <  0
    BR_GEZ  = 4'd6,        // rs >= 0
    BR_J    = 4'd7,        // J/JAL: {PC+4[31:28], index, 00}
    BR_JR   = 4'd8         // JR/JALR: rs
  } br_e;

  // Width of a data-memory access
  typedef enum logic [2:0] {
    MEM_B  = 3'd0,         // byte
    MEM_H  = 3'd1,         // half word
    MEM_W  = 3'd2,         // word
    MEM_WL = 3'd3,         // LWL/SWL: bytes 0..k of the word, k = address bits 1:0
    MEM_WR = 3'd4          // LWR/SWR: bytes k..3 of the word
  } mem_size_e;

  // Control signals produced in ID by the decoder.
  typedef struct packed {
    alu_op_e  alu_op;
    logic     alu_src_imm;  // B input of the ALU is the extended immediate
    logic     a_is_shamt;   // A input of the ALU is the shamt field (SLL/SRL/SRA)
    logic     sign_ext;     // immediate is sign (1) or zero (0) extended
    logic     reg_we;       // RegWr: instruction writes register 'dest'
    logic     mem_rd;       // load: WB value comes from data memory
    logic     mem_wr;       // MemWr: store
    mem_size_e mem_size;    // access width of a load or store
    logic     ld_unsigned;  // LBU/LHU: zero-extend the loaded byte/half
    logic     uses_ra;      // instruction reads rs
    logic     uses_rb;      // instruction reads rt
    md_op_e   md_op;        // HI/LO write (MULT, DIV, MTHI, MTLO ...)
    logic     mf_hi;        // MFHI: EX result is HI
    logic     mf_lo;        // MFLO: EX result is LO
    br_e      br;           // branch or jump kind
    logic     br_likely;    // BEQL/BNEL/BLEZL/BGTZL: annul the delay slot if not taken
    logic     link;         // JAL/JALR: EX result is the return address PC+8
    logic     ll;           // LL: load word and set the link bit
    logic     sc;           // SC: store only if the link bit is set; rt = link bit
  } ctrl_t;

  // IF/ID
  typedef struct packed {
    logic  valid;
    word_t pc4;
    word_t inst;
  } ifid_t;

  // ID/EX
  typedef struct packed {
    logic     valid;
    word_t    pc4;
    ctrl_t    ctrl;
    word_t    val_a;
    word_t    val_b;
    word_t    imm;
    logic [4:0] shamt;
    logic [25:0] jidx;     // J/JAL instruction index
    reg_idx_t ra;
    reg_idx_t rb;
    reg_idx_t rd;          // destination already chosen between rd and rt
  } idex_t;

  // EX/MEM
  typedef struct packed {
    logic     valid;
    word_t    pc4;
    logic     reg_we;
    logic     mem_rd;
    logic     mem_wr;
    mem_size_e mem_size;
    logic     ld_unsigned;
    logic     ll;
    logic     sc;
    word_t    d;           // ALU result / memory address
    word_t    b;           // store data
    reg_idx_t rd;
  } exmem_t;

  // MEM/WB
  typedef struct packed {
    logic     valid;
    word_t    pc4;
    logic     reg_we;
    logic     mem_rd;
    word_t    d;           // ALU result
    word_t    m;           // loaded data, aligned and extended
    reg_idx_t rd;
  } memwb_t;

  // Forwarding selection for one EX operand
  typedef enum logic [1:0] {
    FWD_REG  = 2'd0,       // value read in ID (ID/EX.A or ID/EX.B)
    FWD_EXM  = 2'd1,       // EX/MEM.D  (M -> Ex)
    FWD_WB   = 2'd2        // final WB value (W -> Ex)
  } fwd_sel_e;

endpackage

// tb_control: self-checking test of the instruction decoder.
// For every supported instruction, and for unsupported encodings (SYNC is
// among the function codes that must decode to a nop), builds
// instructions with random register fields and checks the control bundle, the
// source register numbers and the destination (rd for R-type, rt otherwise)
// against an expected-value table written out in this testbench.
module tb_control;
  import mips_pkg::*;

  word_t    inst;
  ctrl_t    ctrl;
  reg_idx_t ra, rb, dest;
  int checks = 0, failures = 0;

  control dut (.inst, .ctrl, .ra, .rb, .dest);

  typedef struct {
    string   name;
    bit      rtype;
    bit [5:0] code;    // opcode, or funct for R-type
    alu_op_e op;
    bit imm, shamt, sext, we, mrd, mwr, ua, ub;
    int sz;            // access width for loads/stores: 0 byte, 1 half, 2 word,
                       // 3 left part (LWL/SWL), 4 right part (LWR/SWR)
    bit un;            // load zero-extends
    int md;            // expected md_op (HI/LO write)
    bit mfh, mfl;      // MFHI / MFLO
    int br;            // expected branch kind (br_e)
    bit lik, lnk;      // likely branch, link
    int rtc;           // fixed rt field (REGIMM sub-code), -1 random
    int dfix;          // fixed destination (JAL), -1 none
    bit ll, sc;        // LL / SC
  } row_t;

  row_t tbl[$];

  task automatic add(string n, bit r, bit [5:0] c, alu_op_e o,
                     bit imm, bit sh, bit se, bit we, bit mrd, bit mwr, bit ua, bit ub,
                     int sz = 2, bit un = 0, int md = 0, bit mfh = 0, bit mfl = 0,
                     int br = 0, bit lik = 0, bit lnk = 0, int rtc = -1, int dfix = -1,
                     bit ll = 0, bit sc = 0);
    tbl.push_back('{n, r, c, o, imm, sh, se, we, mrd, mwr, ua, ub, sz, un, md, mfh, mfl,
                   br, lik, lnk, rtc, dfix, ll, sc});
  endtask

  task automatic check_one(row_t r);
    reg_idx_t s, t, d;
    word_t    i;
    reg_idx_t exp_dest;
    s = 5'($urandom); t = 5'($urandom); d = 5'($urandom);
    if (r.rtc >= 0) t = 5'(r.rtc);
    if (r.rtype) i = {6'h00, s, t, d, 5'($urandom), r.code};
    else         i = {r.code, s, t, 16'($urandom)};
    inst = i;
    #1;
    exp_dest = (r.dfix >= 0) ? 5'(r.dfix) : r.rtype ? d : t;
    checks++;
    if (ctrl.alu_op !== r.op || ctrl.alu_src_imm !== r.imm || ctrl.a_is_shamt !== r.shamt ||
        ctrl.reg_we !== r.we || ctrl.mem_rd !== r.mrd || ctrl.mem_wr !== r.mwr ||
        ctrl.uses_ra !== r.ua || ctrl.uses_rb !== r.ub ||
        (r.imm && ctrl.sign_ext !== r.sext) ||
        ((r.mrd || r.mwr) && (int'(ctrl.mem_size) != r.sz)) ||
        (r.mrd && ctrl.ld_unsigned !== r.un) ||
        int'(ctrl.md_op) != r.md || ctrl.mf_hi !== r.mfh || ctrl.mf_lo !== r.mfl ||
        int'(ctrl.br) != r.br || ctrl.br_likely !== r.lik || ctrl.link !== r.lnk ||
        ctrl.ll !== r.ll || ctrl.sc !== r.sc ||
        ((r.br != 0 && r.br != 7 && r.br != 8) && ctrl.sign_ext !== 1'b1) ||
        ra !== s || rb !== t || (r.we && dest !== exp_dest)) begin
      failures++;
      $display("FAIL %s inst=%h ctrl=%p dest=%0d", r.name, i, ctrl, dest);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //    name     R  code  op        imm sh se we rd wr ua ub
    add("add",   1, 6'h20, ALU_ADD,  0, 0, 0, 1, 0, 0, 1, 1);
    add("addu",  1, 6'h21, ALU_ADD,  0, 0, 0, 1, 0, 0, 1, 1);
    add("sub",   1, 6'h22, ALU_SUB,  0, 0, 0, 1, 0, 0, 1, 1);
    add("subu",  1, 6'h23, ALU_SUB,  0, 0, 0, 1, 0, 0, 1, 1);
    add("and",   1, 6'h24, ALU_AND,  0, 0, 0, 1, 0, 0, 1, 1);
    add("or",    1, 6'h25, ALU_OR,   0, 0, 0, 1, 0, 0, 1, 1);
    add("xor",   1, 6'h26, ALU_XOR,  0, 0, 0, 1, 0, 0, 1, 1);
    add("nor",   1, 6'h27, ALU_NOR,  0, 0, 0, 1, 0, 0, 1, 1);
    add("slt",   1, 6'h2A, ALU_SLT,  0, 0, 0, 1, 0, 0, 1, 1);
    add("sltu",  1, 6'h2B, ALU_SLTU, 0, 0, 0, 1, 0, 0, 1, 1);
    add("sll",   1, 6'h00, ALU_SLL,  0, 1, 0, 1, 0, 0, 0, 1);
    add("srl",   1, 6'h02, ALU_SRL,  0, 1, 0, 1, 0, 0, 0, 1);
    add("sra",   1, 6'h03, ALU_SRA,  0, 1, 0, 1, 0, 0, 0, 1);
    add("sllv",  1, 6'h04, ALU_SLL,  0, 0, 0, 1, 0, 0, 1, 1);
    add("srlv",  1, 6'h06, ALU_SRL,  0, 0, 0, 1, 0, 0, 1, 1);
    add("srav",  1, 6'h07, ALU_SRA,  0, 0, 0, 1, 0, 0, 1, 1);
    add("addi",  0, 6'h08, ALU_ADD,  1, 0, 1, 1, 0, 0, 1, 0);
    add("addiu", 0, 6'h09, ALU_ADD,  1, 0, 1, 1, 0, 0, 1, 0);
    add("slti",  0, 6'h0A, ALU_SLT,  1, 0, 1, 1, 0, 0, 1, 0);
    add("sltiu", 0, 6'h0B, ALU_SLTU, 1, 0, 1, 1, 0, 0, 1, 0);
    add("andi",  0, 6'h0C, ALU_AND,  1, 0, 0, 1, 0, 0, 1, 0);
    add("ori",   0, 6'h0D, ALU_OR,   1, 0, 0, 1, 0, 0, 1, 0);
    add("xori",  0, 6'h0E, ALU_XOR,  1, 0, 0, 1, 0, 0, 1, 0);
    add("lui",   0, 6'h0F, ALU_LUI,  1, 0, 0, 1, 0, 0, 0, 0);
    add("lw",    0, 6'h23, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0);
    add("sw",    0, 6'h2B, ALU_ADD,  1, 0, 1, 0, 0, 1, 1, 1);
    add("lb",    0, 6'h20, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0, 0, 0);
    add("lh",    0, 6'h21, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0, 1, 0);
    add("lbu",   0, 6'h24, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0, 0, 1);
    add("lhu",   0, 6'h25, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0, 1, 1);
    add("sb",    0, 6'h28, ALU_ADD,  1, 0, 1, 0, 0, 1, 1, 1, 0, 0);
    add("sh",    0, 6'h29, ALU_ADD,  1, 0, 1, 0, 0, 1, 1, 1, 1, 0);
    add("lwl",   0, 6'h22, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 1, 3, 0);
    add("lwr",   0, 6'h26, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 1, 4, 0);
    add("swl",   0, 6'h2A, ALU_ADD,  1, 0, 1, 0, 0, 1, 1, 1, 3, 0);
    add("swr",   0, 6'h2E, ALU_ADD,  1, 0, 1, 0, 0, 1, 1, 1, 4, 0);
    // HI/LO group: md codes 1 MULT, 2 MULTU, 3 DIV, 4 DIVU, 5 MTHI, 6 MTLO
    add("mult",  1, 6'h18, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 1);
    add("multu", 1, 6'h19, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 2);
    add("div",   1, 6'h1A, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 3);
    add("divu",  1, 6'h1B, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 4);
    add("mthi",  1, 6'h11, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 5);
    add("mtlo",  1, 6'h13, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 6);
    add("mfhi",  1, 6'h10, ALU_ADD,  0, 0, 0, 1, 0, 0, 0, 0, 2, 0, 0, 1, 0);
    add("mflo",  1, 6'h12, ALU_ADD,  0, 0, 0, 1, 0, 0, 0, 0, 2, 0, 0, 0, 1);
    // branches and jumps: br codes 1 EQ, 2 NE, 3 LEZ, 4 GTZ, 5 LTZ, 6 GEZ, 7 J, 8 JR
    //    name     R  code  op        imm sh se we rd wr ua ub sz un md fh fl br lk ln rtc dfix
    add("beq",   0, 6'h04, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 0, 0, 0, 1);
    add("bne",   0, 6'h05, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 0, 0, 0, 2);
    add("blez",  0, 6'h06, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 3);
    add("bgtz",  0, 6'h07, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 4);
    add("beql",  0, 6'h14, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 0, 0, 0, 1, 1);
    add("bnel",  0, 6'h15, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 1, 2, 0, 0, 0, 0, 2, 1);
    add("blezl", 0, 6'h16, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 3, 1);
    add("bgtzl", 0, 6'h17, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 4, 1);
    add("bltz",  0, 6'h01, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 5, 0, 0, 0);
    add("bgez",  0, 6'h01, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 6, 0, 0, 1);
    add("j",     0, 6'h02, ALU_ADD,  0, 0, 0, 0, 0, 0, 0, 0, 2, 0, 0, 0, 0, 7);
    add("jal",   0, 6'h03, ALU_ADD,  0, 0, 0, 1, 0, 0, 0, 0, 2, 0, 0, 0, 0, 7, 0, 1, -1, 31);
    add("jr",    1, 6'h08, ALU_ADD,  0, 0, 0, 0, 0, 0, 1, 0, 2, 0, 0, 0, 0, 8);
    add("jalr",  1, 6'h09, ALU_ADD,  0, 0, 0, 1, 0, 0, 1, 0, 2, 0, 0, 0, 0, 8, 0, 1);
    //    name     R  code  op        imm sh se we rd wr ua ub sz un md fh fl br lk ln rtc dfix ll sc
    add("ll",    0, 6'h30, ALU_ADD,  1, 0, 1, 1, 1, 0, 1, 0, 2, 0, 0, 0, 0, 0, 0, 0, -1, -1, 1, 0);
    add("sc",    0, 6'h38, ALU_ADD,  1, 0, 1, 1, 1, 1, 1, 1, 2, 0, 0, 0, 0, 0, 0, 0, -1, -1, 0, 1);
    for (int k = 0; k < 20; k++)
      foreach (tbl[n]) check_one(tbl[n]);
    // unsupported encodings: no write of any kind
    for (int k = 0; k < 200; k++) begin
      logic [5:0] opc;
      do opc = 6'($urandom);
      while (opc inside {6'h00, 6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07,
                         6'h14, 6'h15, 6'h16, 6'h17, 6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F,
                         6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h28, 6'h29,
                         6'h2A, 6'h2B, 6'h2E, 6'h30, 6'h38});
      inst = {opc, 26'($urandom)};
      #1;
      checks++;
      if (ctrl.reg_we || ctrl.mem_wr || ctrl.mem_rd || ctrl.md_op != MD_NONE || ctrl.br != BR_NONE) begin
        failures++; $display("FAIL unsupported %h decoded with writes", inst);
      end
    end
    // unsupported R-type function codes: no write of any kind
    for (int k = 0; k < 200; k++) begin
      logic [5:0] f;
      do f = 6'($urandom);
      while (f inside {6'h00, 6'h02, 6'h03, 6'h04, 6'h06, 6'h07, 6'h08, 6'h09, [6'h10:6'h13], [6'h18:6'h1B],
                       [6'h20:6'h27], 6'h2A, 6'h2B});
      inst = {6'h00, 20'($urandom), f};
      #1;
      checks++;
      if (ctrl.reg_we || ctrl.mem_wr || ctrl.mem_rd || ctrl.md_op != MD_NONE) begin
        failures++; $display("FAIL unsupported funct %h decoded with writes", inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mips_tb_defs.svh: testbench helpers for the MIPS pipeline, included inside
// a testbench module.
//
// * Encoders for the supported instructions (standard MIPS32 encodings), so
//   test programs read like assembly.
// * An instruction-set reference model: executes a program one instruction at
//   a time, with no pipeline, and gives the architectural register and memory
//   state the pipeline must end with.  Branches and jumps follow the MIPS
//   rules: one delay slot, which a not-taken likely branch skips.  LL sets a
//   link bit, SC stores only while it is set, returns it in rt and clears
//   it.  Memory is REF_DMEM_WORDS words indexed by (address >> 2) modulo the
//   size, like the data memory; bytes are little-endian and address bits
//   below the access width are ignored.
// * The data-memory preload pattern shared by the testbenches.

  typedef logic [31:0] word_t;

  localparam int REF_DMEM_WORDS = 256;

  // ---------------------------------------------------------------- encoders
  function automatic word_t enc_r(logic [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic word_t ADD (int d, int s, int t); return enc_r(6'h20, d, s, t); endfunction
  function automatic word_t ADDU(int d, int s, int t); return enc_r(6'h21, d, s, t); endfunction
  function automatic word_t SUB (int d, int s, int t); return enc_r(6'h22, d, s, t); endfunction
  function automatic word_t AND (int d, int s, int t); return enc_r(6'h24, d, s, t); endfunction
  function automatic word_t OR  (int d, int s, int t); return enc_r(6'h25, d, s, t); endfunction
  function automatic word_t XOR (int d, int s, int t); return enc_r(6'h26, d, s, t); endfunction
  function automatic word_t NOR (int d, int s, int t); return enc_r(6'h27, d, s, t); endfunction
  function automatic word_t SLT (int d, int s, int t); return enc_r(6'h2A, d, s, t); endfunction
  function automatic word_t SLTU(int d, int s, int t); return enc_r(6'h2B, d, s, t); endfunction
  function automatic word_t SLLV(int d, int t, int s); return enc_r(6'h04, d, s, t); endfunction
  function automatic word_t SRAV(int d, int t, int s); return enc_r(6'h07, d, s, t); endfunction
  function automatic word_t SLL (int d, int t, int sh); return enc_r(6'h00, d, 0, t, sh); endfunction
  function automatic word_t SRL (int d, int t, int sh); return enc_r(6'h02, d, 0, t, sh); endfunction
  function automatic word_t SRA (int d, int t, int sh); return enc_r(6'h03, d, 0, t, sh); endfunction
  function automatic word_t ADDI (int t, int s, int imm); return enc_i(6'h08, t, s, imm); endfunction
  function automatic word_t SLTI (int t, int s, int imm); return enc_i(6'h0A, t, s, imm); endfunction
  function automatic word_t ANDI (int t, int s, int imm); return enc_i(6'h0C, t, s, imm); endfunction
  function automatic word_t ORI  (int t, int s, int imm); return enc_i(6'h0D, t, s, imm); endfunction
  function automatic word_t XORI (int t, int s, int imm); return enc_i(6'h0E, t, s, imm); endfunction
  function automatic word_t LUI  (int t, int imm);        return enc_i(6'h0F, t, 0, imm); endfunction
  function automatic word_t LW (int t, int off, int s);   return enc_i(6'h23, t, s, off); endfunction
  function automatic word_t SW (int t, int off, int s);   return enc_i(6'h2B, t, s, off); endfunction
  function automatic word_t LB (int t, int off, int s);   return enc_i(6'h20, t, s, off); endfunction
  function automatic word_t LH (int t, int off, int s);   return enc_i(6'h21, t, s, off); endfunction
  function automatic word_t LBU(int t, int off, int s);   return enc_i(6'h24, t, s, off); endfunction
  function automatic word_t LHU(int t, int off, int s);   return enc_i(6'h25, t, s, off); endfunction
  function automatic word_t SB (int t, int off, int s);   return enc_i(6'h28, t, s, off); endfunction
  function automatic word_t SH (int t, int off, int s);   return enc_i(6'h29, t, s, off); endfunction
  function automatic word_t MULT (int s, int t);         return enc_r(6'h18, 0, s, t); endfunction
  function automatic word_t MULTU(int s, int t);         return enc_r(6'h19, 0, s, t); endfunction
  function automatic word_t DIV  (int s, int t);         return enc_r(6'h1A, 0, s, t); endfunction
  function automatic word_t DIVU (int s, int t);         return enc_r(6'h1B, 0, s, t); endfunction
  function automatic word_t MFHI (int d);                return enc_r(6'h10, d, 0, 0); endfunction
  function automatic word_t MFLO (int d);                return enc_r(6'h12, d, 0, 0); endfunction
  function automatic word_t MTHI (int s);                return enc_r(6'h11, 0, s, 0); endfunction
  function automatic word_t MTLO (int s);                return enc_r(6'h13, 0, s, 0); endfunction
  function automatic word_t LWL(int t, int off, int s);   return enc_i(6'h22, t, s, off); endfunction
  function automatic word_t LWR(int t, int off, int s);   return enc_i(6'h26, t, s, off); endfunction
  function automatic word_t SWL(int t, int off, int s);   return enc_i(6'h2A, t, s, off); endfunction
  function automatic word_t SWR(int t, int off, int s);   return enc_i(6'h2E, t, s, off); endfunction
  function automatic word_t LL(int t, int off, int s);    return enc_i(6'h30, t, s, off); endfunction
  function automatic word_t SC(int t, int off, int s);    return enc_i(6'h38, t, s, off); endfunction
  function automatic word_t BEQ (int s, int t, int off); return enc_i(6'h04, t, s, off); endfunction
  function automatic word_t BNE (int s, int t, int off); return enc_i(6'h05, t, s, off); endfunction
  function automatic word_t BLEZ(int s, int off);        return enc_i(6'h06, 0, s, off); endfunction
  function automatic word_t BGTZ(int s, int off);        return enc_i(6'h07, 0, s, off); endfunction
  function automatic word_t BLTZ(int s, int off);        return enc_i(6'h01, 0, s, off); endfunction
  function automatic word_t BGEZ(int s, int off);        return enc_i(6'h01, 1, s, off); endfunction
  function automatic word_t BEQL(int s, int t, int off); return enc_i(6'h14, t, s, off); endfunction
  function automatic word_t BNEL(int s, int t, int off); return enc_i(6'h15, t, s, off); endfunction
  function automatic word_t BLEZL(int s, int off);       return enc_i(6'h16, 0, s, off); endfunction
  function automatic word_t BGTZL(int s, int off);       return enc_i(6'h17, 0, s, off); endfunction
  function automatic word_t J   (int idx);               return {6'h02, 26'(idx)}; endfunction
  function automatic word_t JAL (int idx);               return {6'h03, 26'(idx)}; endfunction
  function automatic word_t JR  (int s);                 return enc_r(6'h08, 0, s, 0); endfunction
  function automatic word_t JALR(int d, int s);          return enc_r(6'h09, d, s, 0); endfunction
  function automatic word_t NOP();                        return 32'h0000_0000; endfunction

  // ---------------------------------------------------------------- preload
  function automatic word_t dmem_init(int i);
    return word_t'(i) * 32'h0101_0101 ^ 32'h00A5_5A00;
  endfunction

  // ---------------------------------------------------------------- model
  class ref_model;
    word_t regs [32];
    word_t mem  [REF_DMEM_WORDS];
    word_t hi, lo;
    bit    llbit;        // LL/SC link bit
    word_t pc, npc;

    function new();
      foreach (regs[i]) regs[i] = '0;
      hi = '0; lo = '0; llbit = 0;
      pc = '0; npc = 32'd4;
      foreach (mem[i])  mem[i]  = dmem_init(i);
    endfunction

    function automatic word_t sext(logic [15:0] v);
      return {{16{v[15]}}, v};
    endfunction

    // byte access by byte address
    function automatic logic [7:0] rd_byte(word_t a);
      return mem[(a >> 2) % REF_DMEM_WORDS][8 * a[1:0] +: 8];
    endfunction
    function automatic void wr_byte(word_t a, logic [7:0] v);
      mem[(a >> 2) % REF_DMEM_WORDS][8 * a[1:0] +: 8] = v;
    endfunction

    // execute from address 0 until the PC leaves the program; returns the
    // number of instructions executed
    function int run(word_t prog[$]);
      int cnt = 0;
      while (pc < 32'(prog.size() * 4) && cnt < 100000) begin
        step(prog[pc >> 2]);
        cnt++;
      end
      return cnt;
    endfunction

    function void step(word_t inst);
      logic [5:0] op, fn;
      int s, t, d, sh;
      word_t a, b, r, imm_s, imm_z, ea;
      bit wr;
      op = inst[31:26]; fn = inst[5:0];
      s = inst[25:21]; t = inst[20:16]; d = inst[15:11]; sh = inst[10:6];
      a = regs[s]; b = regs[t];
      imm_s = sext(inst[15:0]); imm_z = {16'h0, inst[15:0]};
      ea = a + imm_s;
      wr = 1; r = '0;
      begin
        // PC: the delay slot (old npc) runs next, then the branch target
        word_t cur = pc;
        bit is_br = 1, likely = 0, c = 0;
        word_t p4 = cur + 4;
        word_t tgt = p4 + (imm_s << 2);
        pc = npc; npc = npc + 4;
        case (op)
          6'h04, 6'h14: c = (a == b);
          6'h05, 6'h15: c = (a != b);
          6'h06, 6'h16: c = ($signed(a) <= 0);
          6'h07, 6'h17: c = ($signed(a) > 0);
          6'h01: if (t == 0) c = $signed(a) < 0; else if (t == 1) c = $signed(a) >= 0; else is_br = 0;
          6'h02, 6'h03: begin c = 1; tgt = {p4[31:28], inst[25:0], 2'b00}; end
          6'h00: if (fn == 6'h08 || fn == 6'h09) begin c = 1; tgt = a; end else is_br = 0;
          default: is_br = 0;
        endcase
        likely = op inside {6'h14, 6'h15, 6'h16, 6'h17};
        if (is_br && c) npc = tgt;
        if (is_br && likely && !c) begin pc = npc; npc = npc + 4; end
        if (op == 6'h03) begin regs[31] = cur + 8; return; end
        if (op == 6'h00 && fn == 6'h09) begin if (d != 0) regs[d] = cur + 8; return; end
        if (is_br) return;
      end
      case (op)
        6'h00: case (fn)
          6'h20, 6'h21: r = a + b;
          6'h22, 6'h23: r = a - b;
          6'h24: r = a & b;
          6'h25: r = a | b;
          6'h26: r = a ^ b;
          6'h27: r = ~(a | b);
          6'h2A: r = ($signed(a) < $signed(b)) ? 1 : 0;
          6'h2B: r = (a < b) ? 1 : 0;
          6'h00: r = b << sh;
          6'h02: r = b >> sh;
          6'h03: r = $signed(b) >>> sh;
          6'h04: r = b << a[4:0];
          6'h06: r = b >> a[4:0];
          6'h07: r = $signed(b) >>> a[4:0];
          6'h10: r = hi;
          6'h12: r = lo;
          6'h11: begin hi = a; wr = 0; end
          6'h13: begin lo = a; wr = 0; end
          6'h18: begin {hi, lo} = 64'(longint'($signed(a)) * longint'($signed(b))); wr = 0; end
          6'h19: begin {hi, lo} = {32'h0, a} * {32'h0, b}; wr = 0; end
          6'h1A, 6'h1B: begin
            // division by zero: LO = all ones, HI = dividend
            longint x, z;
            x = (fn == 6'h1A) ? longint'($signed(a)) : longint'({32'h0, a});
            z = (fn == 6'h1A) ? longint'($signed(b)) : longint'({32'h0, b});
            if (z == 0) begin lo = '1; hi = a; end
            else begin lo = word_t'(x / z); hi = word_t'(x % z); end
            wr = 0;
          end
          default: wr = 0;
        endcase
        6'h08, 6'h09: begin r = a + imm_s; d = t; end
        6'h0A: begin r = ($signed(a) < $signed(imm_s)) ? 1 : 0; d = t; end
        6'h0B: begin r = (a < imm_s) ? 1 : 0; d = t; end
        6'h0C: begin r = a & imm_z; d = t; end
        6'h0D: begin r = a | imm_z; d = t; end
        6'h0E: begin r = a ^ imm_z; d = t; end
        6'h0F: begin r = {inst[15:0], 16'h0}; d = t; end
        6'h23: begin r = mem[(ea >> 2) % REF_DMEM_WORDS]; d = t; end
        6'h2B: begin mem[(ea >> 2) % REF_DMEM_WORDS] = b; wr = 0; end
        6'h20: begin r = {{24{rd_byte(ea)[7]}}, rd_byte(ea)}; d = t; end
        6'h24: begin r = {24'h0, rd_byte(ea)}; d = t; end
        6'h21, 6'h25: begin
          word_t h = {ea[31:1], 1'b0};
          r = {16'h0, rd_byte(h + 1), rd_byte(h)};
          if (op == 6'h21 && r[15]) r[31:16] = 16'hFFFF;
          d = t;
        end
        6'h28: begin wr_byte(ea, b[7:0]); wr = 0; end
        6'h30: begin r = mem[(ea >> 2) % REF_DMEM_WORDS]; llbit = 1; d = t; end
        6'h38: begin
          if (llbit) mem[(ea >> 2) % REF_DMEM_WORDS] = b;
          r = word_t'(llbit); llbit = 0; d = t;
        end
        // LWL/SWL: memory bytes 0..k <-> register bytes 3-k..3;
        // LWR/SWR: memory bytes k..3 <-> register bytes 0..3-k (k = ea[1:0])
        6'h22, 6'h26, 6'h2A, 6'h2E: begin
          word_t w0 = {ea[31:2], 2'b00};
          int k = ea[1:0];
          bit left = (op == 6'h22 || op == 6'h2A);
          int m0 = left ? 0 : k, m1 = left ? k : 3, r0 = left ? 3 - k : 0;
          r = b;
          for (int m = m0; m <= m1; m++)
            if (op == 6'h22 || op == 6'h26) r[8*(r0 + m - m0) +: 8] = rd_byte(w0 + m);
            else wr_byte(w0 + m, b[8*(r0 + m - m0) +: 8]);
          if (op == 6'h2A || op == 6'h2E) wr = 0;
          d = t;
        end
        6'h29: begin
          word_t h = {ea[31:1], 1'b0};
          wr_byte(h, b[7:0]); wr_byte(h + 1, b[15:8]); wr = 0;
        end
        default: wr = 0;
      endcase
      if (wr && d != 0) regs[d] = r;
    endfunction
  endclass


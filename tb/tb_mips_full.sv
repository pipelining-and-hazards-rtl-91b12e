// tb_mips_full: the processor at its default parameters (32 registers,
// 256-word instruction and data memories, forwarding and register-file bypass
// on) running every example program end to end: the simple sample code, the
// stalling example, forwarding example 2, a load-use sequence, byte and
// half-word accesses, an unaligned word through LWL/LWR/SWL/SWR, a
// multiply/divide sequence, LL/SC, branches and jumps, and random programs.
// Final registers and data memory are compared with the instruction-set
// reference model of mips_tb_defs.svh; stall counts and the write-back cycle
// of the last instruction (N + 4 + stalls + squashes) are checked, and every
// mechanism (load-use stall, M->Ex and W->Ex forwarding,
// register-file bypass, branch squash) must occur.
module tb_mips_full;

`include "tb/mips_tb_defs.svh"

  localparam int NCFG = 1;
  localparam int IMW  = 256;
  localparam int DMW  = 256;

  logic        clk = 0, rst = 1;
  logic        ld_imem_we = 0, ld_dmem_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] dbg_reg_data  [NCFG];
  logic [31:0] dbg_dmem_data [NCFG];
  logic        stall [NCFG], squash [NCFG], rf_bypass [NCFG], retire_valid [NCFG];
  logic [1:0]  fwd_sel_a [NCFG], fwd_sel_b [NCFG];
  logic [31:0] retire_pc [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    mips_pipeline dut (
      .clk, .rst, .ld_imem_we, .ld_dmem_we, .ld_addr, .ld_data,
      .dbg_reg_addr, .dbg_reg_data(dbg_reg_data[g]), .dbg_dmem_data(dbg_dmem_data[g]),
      .stall(stall[g]), .squash(squash[g]), .fwd_sel_a(fwd_sel_a[g]), .fwd_sel_b(fwd_sel_b[g]),
      .rf_bypass(rf_bypass[g]), .retire_valid(retire_valid[g]), .retire_pc(retire_pc[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int tot_stall [NCFG], tot_fwd_m [NCFG], tot_fwd_w [NCFG], tot_byp [NCFG], tot_squash [NCFG];
  int last_squash [NCFG];   // squashed fetches of the last program run

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) fail($sformatf("%s: got %0d expected %0d", what, got, exp));
  endtask

  // Program pieces --------------------------------------------------------
  // Register values of the classic eight-register example ("Initial
  // State"): r1..r7 = 36, 9, 12, 18, 7, 41, 22.  Four nops keep the set-up
  // writes away from the program under test.
  function automatic void prelude(ref word_t p[$]);
    int v[7] = '{36, 9, 12, 18, 7, 41, 22};
    for (int i = 0; i < 7; i++) p.push_back(ADDI(i + 1, 0, v[i]));
    repeat (4) p.push_back(NOP());
  endfunction

  function automatic bit is_br(word_t w);
    return w[31:26] inside {6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07,
                            6'h14, 6'h15, 6'h16, 6'h17} ||
           (w[31:26] == 6'h00 && w[5:0] inside {6'h08, 6'h09});
  endfunction

  // Run one program on all configurations ----------------------------------
  task automatic run(string name, word_t prog[$], int exp_stalls[NCFG]);
    ref_model m;
    int n, nexec, last_cycle [NCFG], retired [NCFG], stalls [NCFG], squashes [NCFG];
    int sq_cyc [NCFG][1024];  // cycles with a squash; one costs time only if
                              // an instruction retires after its delay slot
    int cyc;
    bit done;
    n = prog.size();
    // reference: final state and number of instructions executed
    m = new();
    nexec = m.run(prog);
    // load memories while reset is held
    rst = 1;
    for (int i = 0; i < IMW; i++) begin
      @(negedge clk);
      ld_imem_we = 1; ld_dmem_we = 0; ld_addr = 32'(i * 4);
      ld_data = (i < n) ? prog[i] : NOP();
    end
    for (int i = 0; i < DMW; i++) begin
      @(negedge clk);
      ld_imem_we = 0; ld_dmem_we = 1; ld_addr = 32'(i * 4); ld_data = dmem_init(i);
    end
    @(negedge clk);
    ld_dmem_we = 0;
    @(negedge clk);
    rst = 0;
    for (int g = 0; g < NCFG; g++) begin retired[g] = 0; stalls[g] = 0; squashes[g] = 0; last_cycle[g] = 0; end
    cyc = 0;
    done = 0;
    while (!done && cyc < 20 * nexec + 100) begin
      @(posedge clk);
      cyc++;
      #1;
      // sample the cycle's events (settled after the edge)
      done = 1;
      for (int g = 0; g < NCFG; g++) begin
        if (retired[g] < nexec) begin
          if (stall[g]) begin stalls[g]++; tot_stall[g]++; end
          if (squash[g]) begin sq_cyc[g][squashes[g]] = cyc; squashes[g]++; tot_squash[g]++; end
          if (fwd_sel_a[g] == 2'd1 || fwd_sel_b[g] == 2'd1) tot_fwd_m[g]++;
          if (fwd_sel_a[g] == 2'd2 || fwd_sel_b[g] == 2'd2) tot_fwd_w[g]++;
          if (rf_bypass[g]) tot_byp[g]++;
          if (retire_valid[g] && retire_pc[g] < 32'(n * 4)) begin
            retired[g]++;
            last_cycle[g] = cyc + 1;   // cycle 1 fetched the first instruction
          end
        end
        if (retired[g] < nexec) done = 0;
      end
    end
    // let the last write-back reach the register file
    repeat (2) @(posedge clk);
    #1;
    // reference
    for (int g = 0; g < NCFG; g++) begin
      expect_eq($sformatf("%s cfg%0d instructions retired", name, g), retired[g], nexec);
      last_squash[g] = squashes[g];
      for (int i = 0; i < last_squash[g]; i++)
        if (sq_cyc[g][i] + 4 >= last_cycle[g]) squashes[g]--;
      expect_eq($sformatf("%s cfg%0d one write-back per cycle apart from stalls", name, g),
                last_cycle[g], nexec + 4 + stalls[g] + squashes[g]);
      if (exp_stalls[g] >= 0) begin
        expect_eq($sformatf("%s cfg%0d stall cycles", name, g), stalls[g], exp_stalls[g]);
        expect_eq($sformatf("%s cfg%0d last write-back cycle", name, g),
                  last_cycle[g], nexec + 4 + exp_stalls[g] + squashes[g]);
      end
    end
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      for (int g = 0; g < NCFG; g++)
        expect_eq($sformatf("%s cfg%0d r%0d", name, g, r), dbg_reg_data[g], m.regs[r]);
    end
    for (int i = 0; i < DMW; i++) begin
      ld_addr = 32'(i * 4);
      #1;
      for (int g = 0; g < NCFG; g++)
        expect_eq($sformatf("%s cfg%0d mem[%0d]", name, g, i), dbg_dmem_data[g], m.mem[i]);
    end
    $display("%-12s n=%0d exec=%0d squash=%0d stalls = %0d  cycles = %0d", name, n, nexec, squashes[0], stalls[0], last_cycle[0]);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t p[$];
    for (int g = 0; g < NCFG; g++) begin
      tot_stall[g] = 0; tot_fwd_m[g] = 0; tot_fwd_w[g] = 0; tot_byp[g] = 0; tot_squash[g] = 0;
    end

    // Sample code (simple); nand is not a MIPS instruction, nor stands in
    p = {};
    prelude(p);
    p.push_back(ADD(3, 1, 2));
    p.push_back(NOR(6, 4, 5));
    p.push_back(LW(4, 20, 2));
    p.push_back(ADD(5, 2, 5));
    p.push_back(SW(7, 12, 3));
    run("sample", p, '{0});
    // values worked out by hand: r3 = 36 + 9, r5 = 9 + 7, Mem[45 + 12] = 22,
    // r4 = word at byte address 29 (word 7)
    dbg_reg_addr = 3; #1; expect_eq("sample r3", dbg_reg_data[0], 45);
    dbg_reg_addr = 5; #1; expect_eq("sample r5", dbg_reg_data[0], 16);
    dbg_reg_addr = 4; #1; expect_eq("sample r4", dbg_reg_data[0], dmem_init(7));
    ld_addr = 57;     #1; expect_eq("sample mem[57]", dbg_dmem_data[0], 22);

    // Stalling example: 3 stalls without bypass, 2 with it, none with forwarding
    p = {};
    prelude(p);
    p.push_back(ADD(3, 1, 2));
    p.push_back(SUB(5, 3, 5));
    p.push_back(OR(6, 3, 4));
    p.push_back(ADD(6, 3, 8));
    run("stall", p, '{0});

    // Forwarding examples 1 and 2: M->Ex for sub, W->Ex for or
    p = {};
    prelude(p);
    p.push_back(ADD(3, 1, 2));
    p.push_back(SUB(5, 3, 1));
    p.push_back(OR(6, 3, 4));
    run("forward1", p, '{0});

    // Forwarding example 2
    p = {};
    prelude(p);
    p.push_back(ADD(3, 1, 2));
    p.push_back(SUB(5, 3, 4));
    p.push_back(LW(6, 4, 3));
    p.push_back(OR(5, 3, 5));
    p.push_back(SW(6, 12, 3));
    run("forward2", p, '{0});

    // Load-use (the one stall forwarding cannot remove) and a bypass distance
    p = {};
    prelude(p);
    p.push_back(LW(1, 8, 0));
    p.push_back(ADD(2, 1, 1));
    p.push_back(ADDI(7, 0, 5));
    p.push_back(NOP());
    p.push_back(NOP());
    p.push_back(ADD(8, 7, 7));
    p.push_back(SW(8, 0, 0));
    p.push_back(LW(9, 0, 0));
    p.push_back(SW(9, 4, 0));
    run("load_use", p, '{2});

    // Byte and half-word loads and stores, and a byte load feeding its user
    p = {};
    prelude(p);
    p.push_back(ADDI(1, 0, -2));      // r1 = 0xFFFFFFFE
    p.push_back(SB(1, 101, 0));       // byte 101
    p.push_back(SH(7, 106, 0));       // half at 106
    p.push_back(LB(2, 101, 0));       // sign-extended byte
    p.push_back(ADD(3, 2, 2));        // load-use stall
    p.push_back(LBU(4, 101, 0));
    p.push_back(LH(5, 106, 0));
    p.push_back(LHU(6, 100, 0));
    p.push_back(SW(6, 0, 0));         // load-use stall on the store data
    run("bytes", p, '{2});
    dbg_reg_addr = 2; #1; expect_eq("bytes lb", dbg_reg_data[0], 32'hFFFF_FFFE);
    dbg_reg_addr = 4; #1; expect_eq("bytes lbu", dbg_reg_data[0], 32'h0000_00FE);
    dbg_reg_addr = 5; #1; expect_eq("bytes lh", dbg_reg_data[0], 22);

    // HI/LO: MFLO/MFHI right after MULT/DIV, a forwarded MFLO result feeding
    // DIV, a negative quotient and remainder, MULTU and MTLO
    p = {};
    prelude(p);
    p.push_back(MULT(1, 2));          // 36 * 9
    p.push_back(MFLO(3));             // r3 = 324
    p.push_back(ADD(4, 3, 3));        // r4 = 648
    p.push_back(DIV(4, 5));           // 648 / 7 = 92 rem 4
    p.push_back(MFHI(6));             // r6 = 4
    p.push_back(MFLO(7));             // r7 = 92
    p.push_back(SUB(1, 0, 1));        // r1 = -36
    p.push_back(DIV(1, 5));           // -36 / 7 = -5 rem -1
    p.push_back(MFLO(8));
    p.push_back(MFHI(9));
    p.push_back(MULTU(1, 2));         // (2^32 - 36) * 9: HI = 8
    p.push_back(MFHI(2));
    p.push_back(MTLO(6));
    p.push_back(MFLO(5));             // r5 = 4
    run("hilo", p, '{0});
    dbg_reg_addr = 3; #1; expect_eq("hilo mflo", dbg_reg_data[0], 324);
    dbg_reg_addr = 7; #1; expect_eq("hilo div", dbg_reg_data[0], 92);
    dbg_reg_addr = 6; #1; expect_eq("hilo rem", dbg_reg_data[0], 4);
    dbg_reg_addr = 8; #1; expect_eq("hilo div neg", dbg_reg_data[0], 32'hFFFF_FFFB);
    dbg_reg_addr = 9; #1; expect_eq("hilo rem neg", dbg_reg_data[0], 32'hFFFF_FFFF);
    dbg_reg_addr = 2; #1; expect_eq("hilo multu", dbg_reg_data[0], 8);
    dbg_reg_addr = 5; #1; expect_eq("hilo mtlo", dbg_reg_data[0], 4);

    // Unaligned word through LWL/LWR and SWL/SWR (byte address 203 = word 50,
    // byte 3, through word 51, byte 2)
    p = {};
    prelude(p);
    p.push_back(LWR(1, 203, 0));      // bytes 203 -> r1[7:0]
    p.push_back(LWL(1, 206, 0));      // bytes 204..206 -> r1[31:8]: load-use on r1
    p.push_back(SWR(1, 301, 0));      // r1[23:0] -> bytes 301..303
    p.push_back(SWL(1, 304, 0));      // r1[31:24] -> byte 304
    p.push_back(LW(2, 300, 0));
    p.push_back(LW(3, 304, 0));
    run("unaligned", p, '{2});
    // r1 = bytes 203..206; the stores put r1 at bytes 301..304
    begin
      word_t w50, w51, w75, w76, r1;
      w50 = dmem_init(50); w51 = dmem_init(51); w75 = dmem_init(75); w76 = dmem_init(76);
      r1 = {w51[23:0], w50[31:24]};
      dbg_reg_addr = 1; #1; expect_eq("unaligned lwl/lwr", dbg_reg_data[0], r1);
      dbg_reg_addr = 2; #1; expect_eq("unaligned swr", dbg_reg_data[0], {r1[23:0], w75[7:0]});
      dbg_reg_addr = 3; #1; expect_eq("unaligned swl", dbg_reg_data[0], {w76[31:8], r1[31:24]});
    end

    // LL/SC: an SC after an LL stores and returns 1, a second SC fails
    p = {};
    prelude(p);
    p.push_back(LL(1, 400, 0));
    p.push_back(ADDI(1, 1, 1));       // load-use on r1
    p.push_back(SC(1, 400, 0));       // stores, r1 = 1
    p.push_back(ADDI(2, 1, 0));       // SC result is a load result: stall
    p.push_back(SC(3, 404, 0));       // fails: no store, r3 = 0
    p.push_back(LW(4, 400, 0));
    p.push_back(LW(5, 404, 0));
    run("llsc", p, '{2});
    dbg_reg_addr = 2; #1; expect_eq("llsc success flag", dbg_reg_data[0], 1);
    dbg_reg_addr = 3; #1; expect_eq("llsc failure flag", dbg_reg_data[0], 0);
    dbg_reg_addr = 4; #1; expect_eq("llsc stored", dbg_reg_data[0], dmem_init(100) + 1);
    dbg_reg_addr = 5; #1; expect_eq("llsc not stored", dbg_reg_data[0], dmem_init(101));

    // Branches and jumps with their delay slots (instruction index in brackets)
    p = {};
    prelude(p);                       // [0..10]
    p.push_back(BEQ(1, 1, 3));        // [11] taken -> [15]
    p.push_back(ADDI(2, 2, 1));       // [12] delay slot: r2 = 10
    p.push_back(ADDI(3, 0, 99));      // [13] skipped
    p.push_back(ADDI(4, 0, 99));      // [14] skipped
    p.push_back(BNE(1, 1, 5));        // [15] not taken
    p.push_back(ADDI(5, 5, 1));       // [16] delay slot: r5 = 8
    p.push_back(BEQL(1, 2, 10));      // [17] not taken: delay slot annulled
    p.push_back(ADDI(6, 0, 77));      // [18] annulled
    p.push_back(JAL(22));             // [19] -> [22], r31 = 84
    p.push_back(ADDI(7, 7, 1));       // [20] delay slot: r7 = 23
    p.push_back(ADDI(6, 0, 55));      // [21] skipped
    p.push_back(ADDI(1, 31, 0));      // [22] r1 = 84
    p.push_back(BGTZ(1, 1));          // [23] taken -> [25]
    p.push_back(SUB(1, 1, 1));        // [24] delay slot: r1 = 0
    p.push_back(BLEZ(1, 1));          // [25] r1 forwarded from the delay slot: taken -> [27]
    p.push_back(ADDI(3, 0, 5));       // [26] delay slot
    p.push_back(ADDI(4, 0, 120));     // [27] r4 = address of [30]
    p.push_back(JR(4));               // [28] -> [30]
    p.push_back(ADDI(5, 0, 3));       // [29] delay slot
    p.push_back(BLTZ(2, 5));          // [30] not taken
    p.push_back(NOP());               // [31]
    p.push_back(BGEZ(2, 1));          // [32] taken -> [34]
    p.push_back(NOP());               // [33]
    p.push_back(LW(6, 0, 0));         // [34]
    p.push_back(BNE(6, 0, 1));        // [35] load-use stall, taken -> [37]
    p.push_back(NOP());               // [36]
    p.push_back(ADDI(8, 0, 160));     // [37] r8 = address of [40]
    p.push_back(JALR(9, 8));          // [38] -> [40] (end), r9 = 160
    p.push_back(NOP());               // [39]
    run("branch", p, '{1});
    expect_eq("branch squashes cfg0", last_squash[0], 9);
    dbg_reg_addr = 31; #1; expect_eq("branch jal link", dbg_reg_data[0], 84);
    dbg_reg_addr = 9;  #1; expect_eq("branch jalr link", dbg_reg_data[0], 160);
    dbg_reg_addr = 2;  #1; expect_eq("branch delay slot", dbg_reg_data[0], 10);
    dbg_reg_addr = 6;  #1; expect_eq("branch annul", dbg_reg_data[0], dmem_init(0));
    dbg_reg_addr = 3;  #1; expect_eq("branch skip", dbg_reg_data[0], 5);

    // Random programs over r0..r7 with every supported instruction
    for (int k = 0; k < 4; k++) begin
      p = {};
      prelude(p);
      for (int i = 0; i < 150; i++) begin
        int d, s, t, imm;
        bit last_br;
        d = $urandom_range(0, 7); s = $urandom_range(0, 7); t = $urandom_range(0, 7);
        imm = $urandom_range(0, 65535);
        last_br = is_br(p[p.size() - 1]);
        case ($urandom_range(0, 41))
          0:  p.push_back(ADD(d, s, t));
          1:  p.push_back(SUB(d, s, t));
          2:  p.push_back(AND(d, s, t));
          3:  p.push_back(OR(d, s, t));
          4:  p.push_back(XOR(d, s, t));
          5:  p.push_back(NOR(d, s, t));
          6:  p.push_back(SLT(d, s, t));
          7:  p.push_back(SLTU(d, s, t));
          8:  p.push_back(SLL(d, t, $urandom_range(0, 31)));
          9:  p.push_back(SRA(d, t, $urandom_range(0, 31)));
          10: p.push_back(SLLV(d, t, s));
          11: p.push_back(ADDI(d, s, imm));
          12: p.push_back(ORI(d, s, imm));
          13: p.push_back(LUI(d, imm));
          14: p.push_back(SLTI(d, s, imm));
          15: p.push_back(SRL(d, t, $urandom_range(0, 31)));
          16, 17: p.push_back(LW(d, 4 * $urandom_range(0, 200), $urandom_range(0, 1) ? 0 : s));
          20: p.push_back(LB(d, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          21: p.push_back(LBU(d, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          22: p.push_back(LH(d, 2 * $urandom_range(0, 400), $urandom_range(0, 1) ? 0 : s));
          23: p.push_back(LHU(d, 2 * $urandom_range(0, 400), $urandom_range(0, 1) ? 0 : s));
          24: p.push_back(SB(t, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          25: p.push_back(SH(t, 2 * $urandom_range(0, 400), $urandom_range(0, 1) ? 0 : s));
          26: p.push_back(MULT(s, t));
          27: p.push_back(MULTU(s, t));
          28: p.push_back($urandom_range(0, 1) ? DIV(s, t) : DIVU(s, t));
          29: p.push_back(MFHI(d));
          30: p.push_back(MFLO(d));
          31: p.push_back($urandom_range(0, 1) ? MTHI(s) : MTLO(s));
          32: p.push_back(LWL(d, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          33: p.push_back(LWR(d, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          34: p.push_back(SWL(t, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          35: p.push_back(SWR(t, $urandom_range(0, 800), $urandom_range(0, 1) ? 0 : s));
          40: p.push_back(LL(d, 4 * $urandom_range(0, 200), $urandom_range(0, 1) ? 0 : s));
          41: p.push_back(SC(t, 4 * $urandom_range(0, 200), $urandom_range(0, 1) ? 0 : s));
          36, 37, 38, 39: begin
            // forward branch or jump, never in a delay slot nor last
            int at, tg;
            at = p.size();
            tg = at + 2 + $urandom_range(0, 10);
            if (tg > 161) tg = 161;
            if (last_br || i == 149) p.push_back(ADD(d, s, t));
            else case ($urandom_range(0, 11))
              0: p.push_back(BEQ(s, t, tg - at - 1));
              1: p.push_back(BNE(s, t, tg - at - 1));
              2: p.push_back(BLEZ(s, tg - at - 1));
              3: p.push_back(BGTZ(s, tg - at - 1));
              4: p.push_back(BLTZ(s, tg - at - 1));
              5: p.push_back(BGEZ(s, tg - at - 1));
              6: p.push_back(BEQL(s, t, tg - at - 1));
              7: p.push_back(BNEL(s, t, tg - at - 1));
              8: p.push_back(BLEZL(s, tg - at - 1));
              9: p.push_back(BGTZL(s, tg - at - 1));
              10: p.push_back(J(tg));
              default: p.push_back(JAL(tg));
            endcase
          end
          default: p.push_back(SW(t, 4 * $urandom_range(0, 200), $urandom_range(0, 1) ? 0 : s));
        endcase
      end
      run($sformatf("random%0d", k), p, '{-1});
    end

    // every mechanism must have happened
    expect_eq("cfg0 load-use stall seen", tot_stall[0] > 0, 1);
    expect_eq("cfg0 branch squash seen", tot_squash[0] > 0, 1);
    expect_eq("cfg0 M->Ex forward seen",  tot_fwd_m[0] > 0, 1);
    expect_eq("cfg0 W->Ex forward seen",  tot_fwd_w[0] > 0, 1);
    expect_eq("cfg0 register-file bypass seen", tot_byp[0] > 0, 1);
    $display("cfg0 events: stalls=%0d M->Ex=%0d W->Ex=%0d rf-bypass=%0d",
             tot_stall[0], tot_fwd_m[0], tot_fwd_w[0], tot_byp[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

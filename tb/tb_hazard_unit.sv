// tb_hazard_unit: self-checking test of data-hazard detection.
// Four instances cover FORWARD x RF_BYPASS.  Random register numbers (drawn
// from a small range so that matches are frequent) are compared with a
// reference of the stall rules:
//   no forwarding: stall if a read source (not r0) equals the RegWr
//     destination in ID/EX or EX/MEM, or in MEM/WB without the bypass;
//   forwarding: stall only if ID/EX is a load writing a read source, or, without
//     the bypass, MEM/WB writes it.
module tb_hazard_unit;
  import mips_pkg::*;

  reg_idx_t id_ra, id_rb, idex_rd, exm_rd, mw_rd;
  logic     ua, ub, idex_we, idex_mem_rd, exm_we, mw_we;
  logic     st [4];
  int checks = 0, failures = 0, stalls = 0;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    hazard_unit #(.FORWARD(g[1]), .RF_BYPASS(g[0])) dut (
      .id_ra, .id_rb, .id_uses_ra(ua), .id_uses_rb(ub),
      .idex_rd, .idex_we, .idex_mem_rd, .exm_rd, .exm_we, .mw_rd, .mw_we,
      .stall(st[g]));
  end

  function automatic bit ref_src(reg_idx_t r, bit fwd, bit byp);
    bit h;
    if (r == 0) return 0;
    if (fwd) h = idex_we && idex_mem_rd && r == idex_rd;
    else     h = (idex_we && r == idex_rd) || (exm_we && r == exm_rd);
    if (!byp && mw_we && r == mw_rd) h = 1;
    return h;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the textbook stall example: sub r5, r3, r5 in ID while add r3 is in ID/EX
    id_ra = 3; id_rb = 5; ua = 1; ub = 1;
    idex_rd = 3; idex_we = 1; idex_mem_rd = 0;
    exm_rd = 0; exm_we = 0; mw_rd = 0; mw_we = 0;
    #1;
    checks++;
    if (!(st[0] && st[1] && !st[2] && !st[3])) begin
      failures++; $display("FAIL add->sub case %b%b%b%b", st[3], st[2], st[1], st[0]);
    end
    for (int k = 0; k < 5000; k++) begin
      id_ra = 5'($urandom_range(0, 4)); id_rb = 5'($urandom_range(0, 4));
      ua = 1'($urandom); ub = 1'($urandom);
      idex_rd = 5'($urandom_range(0, 4)); exm_rd = 5'($urandom_range(0, 4));
      mw_rd = 5'($urandom_range(0, 4));
      idex_we = 1'($urandom); idex_mem_rd = 1'($urandom);
      exm_we = 1'($urandom); mw_we = 1'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        bit exp;
        exp = (ua && ref_src(id_ra, g[1], g[0])) || (ub && ref_src(id_rb, g[1], g[0]));
        if (exp) stalls++;
        checks++;
        if (st[g] !== exp) begin
          failures++;
          $display("FAIL cfg %0d ra=%0d rb=%0d got %b exp %b", g, id_ra, id_rb, st[g], exp);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall ever expected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

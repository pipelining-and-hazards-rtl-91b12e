// tb_forward_unit: self-checking test of forwarding selection.
// Random register numbers from a small range against the two detection rules:
// M->Ex when EX/MEM writes the operand register (not r0); otherwise W->Ex when
// MEM/WB writes it; otherwise the register-file value.  Also checks that every
// selection occurs.
module tb_forward_unit;
  import mips_pkg::*;

  reg_idx_t idex_ra, idex_rb, exm_rd, mw_rd;
  logic     exm_we, mw_we;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;
  int seen [3];

  forward_unit dut (.idex_ra, .idex_rb, .exm_rd, .exm_we, .mw_rd, .mw_we, .sel_a, .sel_b);

  function automatic fwd_sel_e ref_sel(reg_idx_t r);
    bit m, w;
    m = exm_we && exm_rd != 0 && r == exm_rd;
    w = mw_we && mw_rd != 0 && r == mw_rd && !m;
    return m ? FWD_EXM : w ? FWD_WB : FWD_REG;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '{0, 0, 0};
    // both producers write r3: the newer one (EX/MEM) must win
    idex_ra = 3; idex_rb = 1; exm_rd = 3; exm_we = 1; mw_rd = 3; mw_we = 1;
    #1;
    checks++;
    if (sel_a !== FWD_EXM || sel_b !== FWD_REG) begin failures++; $display("FAIL priority"); end
    for (int k = 0; k < 5000; k++) begin
      fwd_sel_e ea, eb;
      idex_ra = 5'($urandom_range(0, 3)); idex_rb = 5'($urandom_range(0, 3));
      exm_rd = 5'($urandom_range(0, 3)); mw_rd = 5'($urandom_range(0, 3));
      exm_we = 1'($urandom); mw_we = 1'($urandom);
      #1;
      ea = ref_sel(idex_ra); eb = ref_sel(idex_rb);
      seen[ea]++;
      checks++;
      if (sel_a !== ea || sel_b !== eb) begin
        failures++;
        $display("FAIL ra=%0d rb=%0d exm=%0d/%b mw=%0d/%b got %s %s", idex_ra, idex_rb,
                 exm_rd, exm_we, mw_rd, mw_we, sel_a.name(), sel_b.name());
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL selection %0d never occurred", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

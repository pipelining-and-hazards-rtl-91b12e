// tb_regfile: self-checking test of the register file.
// Random writes and reads against a shadow array: register 0 stays zero,
// writes land on the rising edge, and a read of the register being written in
// the same cycle returns the new value with BYPASS = 1 (bypass flags checked
// too) and the old value in a second instance with BYPASS = 0.
module tb_regfile;
  import mips_pkg::*;

  logic     clk = 0, rst, we;
  reg_idx_t ra, rb, wd, dbg_addr;
  word_t    wdata;
  word_t    a1, b1, d1, a0, b0, d0;
  logic     ba1, bb1, ba0, bb0;
  word_t    shadow [32];
  int checks = 0, failures = 0, bypass_seen = 0;

  regfile #(.NREGS(32), .BYPASS(1'b1)) dut (
    .clk, .rst, .ra, .rb, .a(a1), .b(b1), .we, .wd, .wdata,
    .dbg_addr, .dbg_data(d1), .bypass_a(ba1), .bypass_b(bb1));
  regfile #(.NREGS(32), .BYPASS(1'b0)) dut_nobyp (
    .clk, .rst, .ra, .rb, .a(a0), .b(b0), .we, .wd, .wdata,
    .dbg_addr, .dbg_data(d0), .bypass_a(ba0), .bypass_b(bb0));

  always #5 clk = ~clk;

  function automatic word_t rd(reg_idx_t r);
    return (r == 0) ? '0 : shadow[r];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; wd = 0; wdata = 0; dbg_addr = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    for (int k = 0; k < 2000; k++) begin
      logic byp_a, byp_b;
      word_t ea, eb;
      @(negedge clk);
      we = 1'($urandom); wd = 5'($urandom); wdata = $urandom;
      ra = (k % 4 == 0) ? wd : 5'($urandom);
      rb = (k % 7 == 0) ? wd : 5'($urandom);
      dbg_addr = 5'($urandom);
      #1;
      byp_a = we && wd != 0 && ra == wd;
      byp_b = we && wd != 0 && rb == wd;
      ea = byp_a ? wdata : rd(ra);
      eb = byp_b ? wdata : rd(rb);
      if (byp_a || byp_b) bypass_seen++;
      checks += 4;
      if (a1 !== ea || b1 !== eb) begin
        failures++; $display("FAIL bypass rf ra=%0d rb=%0d wd=%0d", ra, rb, wd);
      end
      if (ba1 !== byp_a || bb1 !== byp_b || ba0 || bb0) begin
        failures++; $display("FAIL bypass flags");
      end
      if (a0 !== rd(ra) || b0 !== rd(rb)) begin
        failures++; $display("FAIL plain rf ra=%0d rb=%0d", ra, rb);
      end
      if (d1 !== rd(dbg_addr) || d0 !== rd(dbg_addr)) begin
        failures++; $display("FAIL dbg port %0d", dbg_addr);
      end
      @(posedge clk);
      if (we && wd != 0) shadow[wd] = wdata;
    end
    checks++;
    if (bypass_seen == 0) begin failures++; $display("FAIL bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

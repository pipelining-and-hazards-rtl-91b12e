// tb_pipe_reg: self-checking test of a pipeline register.
// Uses the ID/EX struct as the payload.  Checks load, hold while en = 0,
// bubble (all zero) on clr even when en = 1, and reset.
module tb_pipe_reg;
  import mips_pkg::*;

  logic  clk = 0, rst, en, clr;
  idex_t d, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.T(idex_t)) dut (.clk, .rst, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic idex_t rand_idex();
    idex_t v;
    v = '0;
    v.valid = 1'b1; v.pc4 = $urandom; v.val_a = $urandom; v.val_b = $urandom;
    v.imm = $urandom; v.ra = 5'($urandom); v.rb = 5'($urandom); v.rd = 5'($urandom);
    v.shamt = 5'($urandom); v.ctrl.reg_we = 1'($urandom); v.ctrl.mem_wr = 1'($urandom);
    return v;
  endfunction

  initial begin
    rst = 1; en = 1; clr = 0; d = rand_idex();
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = '0;
    for (int i = 0; i < 500; i++) begin
      d   = rand_idex();
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 5) == 0);
      @(posedge clk); #1;
      if (clr) model = '0;
      else if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d en=%b clr=%b", i, en, clr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

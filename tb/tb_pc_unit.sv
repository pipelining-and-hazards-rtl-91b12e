// tb_pc_unit: self-checking test of the program counter.
// Checks reset, +4 per cycle, that en = 0 (a stall) holds the PC, and that a
// redirect loads the target whether or not en is 0.
module tb_pc_unit;
  import mips_pkg::*;

  logic  clk = 0, rst, en, redirect;
  word_t pc, pc4, target;
  word_t model;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .en, .redirect, .target, .pc, .pc4);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1; redirect = 0; target = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    for (int i = 0; i < 200; i++) begin
      en = (i % 5 != 3);
      redirect = ($urandom_range(0, 6) == 0);
      target = $urandom & 32'hFFFF_FFFC;
      checks++;
      if (pc !== model || pc4 !== model + 4) begin
        failures++;
        $display("FAIL cycle %0d pc=%h pc4=%h exp=%h", i, pc, pc4, model);
      end
      @(posedge clk); #1;
      if (redirect) model = target;
      else if (en) model = model + 4;
    end
    redirect = 1; rst = 1; @(posedge clk); #1; rst = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

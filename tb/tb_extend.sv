// tb_extend: self-checking test of the immediate extender.
// Random and corner immediates, both modes, against a reference written with
// signed arithmetic.
module tb_extend;
  import mips_pkg::*;

  logic [15:0] imm16;
  logic        sign_ext;
  word_t       imm32;
  int checks = 0, failures = 0;

  extend dut (.imm16, .sign_ext, .imm32);

  task automatic check(logic [15:0] v, logic s);
    word_t exp;
    imm16 = v; sign_ext = s;
    #1;
    if (s && v >= 16'h8000) exp = word_t'(int'(v) - 65536);
    else                    exp = word_t'(v);
    checks++;
    if (imm32 !== exp) begin
      failures++;
      $display("FAIL imm=%h sign=%b got=%h exp=%h", v, s, imm32, exp);
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
    check(16'd20, 1'b1);
    check(16'hFFFC, 1'b1);
    check(16'hFFFC, 1'b0);
    check(16'h8000, 1'b1);
    check(16'h7FFF, 1'b1);
    for (int i = 0; i < 1000; i++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

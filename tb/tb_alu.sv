// tb_alu: self-checking test of the ALU.
// Drives every operation with directed corner values and random operands and
// compares y with a reference computed here from the operation's definition.
module tb_alu;
  import mips_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return word_t'(longint'(x) + longint'(z));
      ALU_SUB:  return word_t'(longint'(x) - longint'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 32'd1 : 32'd0;
      ALU_SLL:  return word_t'(longint'(z) * (longint'(1) << x[4:0]));
      ALU_SRL:  return word_t'(longint'(z) / (longint'(1) << x[4:0]));
      ALU_SRA:  begin
                  word_t r = z;
                  for (int i = 0; i < int'(x[4:0]); i++) r = {r[31], r[31:1]};
                  return r;
                end
      ALU_LUI:  return z * 32'd65536;
      default:  return '0;
    endcase
  endfunction

  task automatic check(alu_op_e o, word_t x, word_t z);
    word_t exp;
    op = o; a = x; b = z;
    #1;
    exp = ref_alu(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, exp);
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
    // values from the example program: 36 + 9, ~(18 & 7) as nor/and, 9 + 20
    check(ALU_ADD, 32'd36, 32'd9);
    check(ALU_AND, 32'd18, 32'd7);
    check(ALU_SUB, 32'd12, 32'd45);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'd1);
    check(ALU_SLTU, 32'hFFFF_FFFF, 32'd1);
    check(ALU_SRA, 32'd4, 32'h8000_0000);
    check(ALU_LUI, 32'd0, 32'h0000_1234);
    for (int i = 0; i < 4000; i++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(0, 11));
      check(o, $urandom, (i % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

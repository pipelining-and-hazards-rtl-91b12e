// alu: the execute-stage arithmetic/logic unit.
//
// Purely combinational.  It computes y = f(a, b) for the integer operations
// of the MIPS arithmetic/logical group built here: add, subtract, and, or,
// xor, nor, signed and unsigned set-less-than, the three shifts and LUI.
// Shifts move operand b by a[4:0]; the datapath feeds a with either rs (the
// variable shifts) or the shamt field.  LUI places b[15:0] in the upper half.
// Add and subtract wrap around: the overflow trap of MIPS ADD/SUB is not
// modelled, a choice of this design.
module alu
  import mips_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = word_t'($signed(a) < $signed(b));
      ALU_SLTU: y = word_t'(a < b);
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = word_t'($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = '0;
    endcase
  end

endmodule

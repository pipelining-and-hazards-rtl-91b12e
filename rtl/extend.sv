// extend: immediate extender of the decode stage.
//
// Widens the 16-bit I-type immediate to 32 bits, copying bit 15 into the upper
// half when sign_ext is 1 and filling it with zeros otherwise.  Combinational.
// Which instructions use which extension is decided by the decoder (control).
module extend
  import mips_pkg::*;
(
  input  logic [15:0] imm16,
  input  logic        sign_ext,
  output word_t       imm32
);

  assign imm32 = {{16{sign_ext & imm16[15]}}, imm16};

endmodule

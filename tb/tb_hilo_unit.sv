// tb_hilo_unit: self-checking test of the HI/LO register pair.
// Applies one operation per clock (MULT, MULTU, DIV, DIVU, MTHI, MTLO or no
// operation) with corner and random operands and, after the edge, compares
// hi/lo with a reference model kept here.  The reference works in 64-bit
// integers: products by shift-and-add (unsigned) or a signed 64-bit multiply,
// quotients by 64-bit division, so it shares no arithmetic with the unit.
// Division by zero is expected to give LO = all ones and HI = the dividend.
module tb_hilo_unit;
  import mips_pkg::*;

  logic   clk = 0, rst = 1;
  md_op_e op;
  word_t  a, b, hi, lo;
  word_t  exp_hi, exp_lo;
  int checks = 0, failures = 0;

  hilo_unit dut (.clk, .rst, .op, .a, .b, .hi, .lo);

  always #5 clk = ~clk;

  function automatic logic [63:0] umul(word_t x, word_t z);
    logic [63:0] acc = 0, m = {32'h0, x};
    for (int i = 0; i < 32; i++) begin
      if (z[i]) acc += m;
      m = m << 1;
    end
    return acc;
  endfunction

  task automatic model(md_op_e o, word_t x, word_t z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'h0, x}), uz = longint'({32'h0, z});
    case (o)
      MD_MULT:  {exp_hi, exp_lo} = 64'(sx * sz);
      MD_MULTU: {exp_hi, exp_lo} = umul(x, z);
      MD_DIV:   if (z == 0) begin exp_lo = '1; exp_hi = x; end
                else begin exp_lo = word_t'(sx / sz); exp_hi = word_t'(sx % sz); end
      MD_DIVU:  if (z == 0) begin exp_lo = '1; exp_hi = x; end
                else begin exp_lo = word_t'(ux / uz); exp_hi = word_t'(ux % uz); end
      MD_MTHI:  exp_hi = x;
      MD_MTLO:  exp_lo = x;
      default: ;
    endcase
  endtask

  task automatic step(md_op_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    @(posedge clk); #1;
    model(o, x, z);
    checks++;
    if (hi !== exp_hi || lo !== exp_lo) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h hi=%h lo=%h exp %h %h", o.name(), x, z, hi, lo, exp_hi, exp_lo);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t corner[8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                       32'd7, 32'hFFFF_FFF9, 32'd36};

  initial begin
    op = MD_NONE; a = 0; b = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    exp_hi = 0; exp_lo = 0;
    checks++;
    if (hi !== 0 || lo !== 0) begin failures++; $display("FAIL reset"); end
    // every operation on every pair of corner values
    for (int o = 1; o <= 6; o++)
      foreach (corner[i]) foreach (corner[j]) step(md_op_e'(o), corner[i], corner[j]);
    // random operations, including no-operation cycles that must hold the pair
    for (int k = 0; k < 3000; k++) begin
      word_t x, z;
      x = $urandom; z = $urandom;
      if ($urandom_range(0, 3) == 0) z = z >> $urandom_range(0, 31);
      if ($urandom_range(0, 7) == 0) z = 0;
      step(md_op_e'($urandom_range(0, 6)), x, z);
    end
    // synchronous reset clears the pair
    rst = 1; op = MD_NONE;
    @(posedge clk); #1;
    checks++;
    if (hi !== 0 || lo !== 0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

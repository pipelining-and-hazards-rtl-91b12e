// tb_mem_align: self-checking test of the byte/half-word lane logic.
// For every width, offset and extension mode, with random data, checks the
// byte enables, that each enabled lane carries the right store byte, and the
// extracted load value, against a reference that works byte by byte.
// For LWL/SWL (k = address bits 1:0) memory bytes 0..k pair with register
// bytes 3-k..3; for LWR/SWR memory bytes k..3 pair with register bytes
// 0..3-k; the other bytes of an LWL/LWR result keep the old register value.
module tb_mem_align;
  import mips_pkg::*;

  logic [1:0] addr_lo;
  mem_size_e  size;
  logic       ld_unsigned;
  word_t      st_data, wdata, mem_word, ld_data;
  logic [3:0] be;
  int checks = 0, failures = 0;

  mem_align dut (.addr_lo, .size, .ld_unsigned, .st_data, .be, .wdata, .mem_word, .ld_data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int nbytes, first;
      logic [3:0] exp_be;
      word_t exp_ld;
      bit ok;
      size = mem_size_e'($urandom_range(0, 4));
      addr_lo = 2'($urandom);
      ld_unsigned = 1'($urandom);
      st_data = $urandom; mem_word = $urandom;
      #1;
      if (size == MEM_WL || size == MEM_WR) begin
        // memory byte m <-> register byte r
        int k, m0, m1, r0;
        k  = int'(addr_lo);
        m0 = (size == MEM_WL) ? 0 : k;
        m1 = (size == MEM_WL) ? k : 3;
        r0 = (size == MEM_WL) ? 3 - k : 0;
        exp_be = '0;
        exp_ld = st_data;
        ok = 1;
        for (int m = m0; m <= m1; m++) begin
          exp_be[m] = 1'b1;
          exp_ld[8*(r0 + m - m0) +: 8] = mem_word[8*m +: 8];
          if (wdata[8*m +: 8] !== st_data[8*(r0 + m - m0) +: 8]) ok = 0;
        end
        if (be !== exp_be || ld_data !== exp_ld) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL %s k=%0d be=%b exp %b ld=%h exp %h wdata=%h st=%h", size.name(), k,
                   be, exp_be, ld_data, exp_ld, wdata, st_data);
        end
        continue;
      end
      nbytes = (size == MEM_B) ? 1 : (size == MEM_H) ? 2 : 4;
      first  = int'(addr_lo) / nbytes * nbytes;
      exp_be = '0;
      exp_ld = '0;
      for (int i = 0; i < nbytes; i++) begin
        exp_be[first + i] = 1'b1;
        exp_ld[8*i +: 8] = mem_word[8*(first + i) +: 8];
      end
      if (!ld_unsigned && nbytes < 4 && exp_ld[8*nbytes - 1])
        for (int b = 8 * nbytes; b < 32; b++) exp_ld[b] = 1'b1;
      ok = (be === exp_be) && (ld_data === exp_ld);
      for (int i = 0; i < nbytes; i++)
        if (wdata[8*(first + i) +: 8] !== st_data[8*i +: 8]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL size=%s lo=%0d uns=%b be=%b exp %b ld=%h exp %h", size.name(), addr_lo,
                 ld_unsigned, be, exp_be, ld_data, exp_ld);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_imem: self-checking test of the instruction memory.
// Loads every word through the write port with a pattern, then reads it back
// at the word's byte address (and with the low address bits set, which must
// be ignored).
module tb_imem;
  import mips_pkg::*;

  localparam int W = 64;
  logic  clk = 0, we;
  word_t addr, rdata, waddr, wdata;
  word_t shadow [W];
  int checks = 0, failures = 0;

  imem #(.WORDS(W)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      shadow[i] = $urandom;
      @(negedge clk); we = 1; waddr = word_t'(i * 4); wdata = shadow[i];
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      int i = $urandom_range(0, W - 1);
      addr = word_t'(i * 4 + ((k % 4 == 0) ? $urandom_range(0, 3) : 0));
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++; $display("FAIL word %0d got %h exp %h", i, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dmem: self-checking test of the data memory.
// Mixes pipeline stores, loader writes and reads on both ports against a
// shadow array kept by the testbench; a store (with random byte enables)
// wins over a loader write.
module tb_dmem;
  import mips_pkg::*;

  localparam int W = 64;
  logic  clk = 0, we, ld_we;
  logic [3:0] be;
  word_t addr, rdata, wdata, ld_addr, ld_wdata, dbg_rdata;
  word_t shadow [W];
  int checks = 0, failures = 0;

  dmem #(.WORDS(W)) dut (.clk, .addr, .rdata, .we, .be, .wdata,
                         .ld_we, .ld_addr, .ld_wdata, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; be = 0; ld_we = 0; addr = 0; wdata = 0; ld_addr = 0; ld_wdata = 0;
    for (int i = 0; i < W; i++) begin
      shadow[i] = $urandom;
      @(negedge clk); ld_we = 1; ld_addr = word_t'(i * 4); ld_wdata = shadow[i];
    end
    @(negedge clk); ld_we = 0;
    for (int k = 0; k < 1000; k++) begin
      int i = $urandom_range(0, W - 1);
      int j = $urandom_range(0, W - 1);
      @(negedge clk);
      addr = word_t'(i * 4); ld_addr = word_t'(j * 4);
      we = 1'($urandom); ld_we = 1'($urandom);
      wdata = $urandom; ld_wdata = $urandom; be = 4'($urandom);
      #1;
      checks += 2;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL read %0d", i); end
      if (dbg_rdata !== shadow[j]) begin failures++; $display("FAIL dbg read %0d", j); end
      @(posedge clk);
      if (we) begin
        for (int l = 0; l < 4; l++) if (be[l]) shadow[i][8*l +: 8] = wdata[8*l +: 8];
      end
      else if (ld_we) shadow[j] = ld_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

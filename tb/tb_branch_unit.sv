// tb_branch_unit: self-checking test of branch and jump resolution.
// Drives every branch kind, with and without "likely", using corner and
// random operands, and checks taken, annul and target against a reference
// that evaluates each condition with signed 64-bit arithmetic and builds the
// targets by multiplication and concatenation of the instruction fields.
module tb_branch_unit;
  import mips_pkg::*;

  br_e         br;
  logic        likely;
  word_t       a, b, pc4, imm, target;
  logic [25:0] jidx;
  logic        taken, annul;
  int checks = 0, failures = 0;

  branch_unit dut (.br, .likely, .a, .b, .pc4, .imm, .jidx, .taken, .annul, .target);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd36};

  task automatic check();
    longint sa;
    bit c;
    word_t t;
    sa = longint'($signed(a));
    case (br)
      BR_EQ:  c = (a == b);
      BR_NE:  c = (a != b);
      BR_LEZ: c = (sa <= 0);
      BR_GTZ: c = (sa > 0);
      BR_LTZ: c = (sa < 0);
      BR_GEZ: c = (sa >= 0);
      BR_J, BR_JR: c = 1;
      default: c = 0;
    endcase
    if (br == BR_J)       t = pc4 / 32'h1000_0000 * 32'h1000_0000 + word_t'(jidx) * 4;
    else if (br == BR_JR) t = a;
    else                  t = word_t'(longint'(pc4) + longint'($signed(imm)) * 4);
    #1;
    checks++;
    if (taken !== c || annul !== (likely && br != BR_NONE && !c) || (c && target !== t)) begin
      failures++;
      $display("FAIL %s likely=%b a=%h b=%h taken=%b annul=%b target=%h exp %b %h",
               br.name(), likely, a, b, taken, annul, target, c, t);
    end
  endtask

  initial begin
    for (int k = 0; k <= 8; k++)
      foreach (corner[i]) foreach (corner[j]) begin
        br = br_e'(k); likely = 1'($urandom); a = corner[i]; b = corner[j];
        pc4 = $urandom & 32'hFFFF_FFFC; imm = {{16{1'b0}}, 16'($urandom)};
        imm = {{16{imm[15]}}, imm[15:0]}; jidx = 26'($urandom);
        check();
      end
    for (int k = 0; k < 3000; k++) begin
      br = br_e'($urandom_range(0, 8)); likely = 1'($urandom);
      a = $urandom; b = ($urandom_range(0, 2) == 0) ? a : $urandom;
      pc4 = $urandom & 32'hFFFF_FFFC; imm = {{16{1'b0}}, 16'($urandom)};
      imm = {{16{imm[15]}}, imm[15:0]}; jidx = 26'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

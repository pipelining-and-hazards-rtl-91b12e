// pipe_reg: one pipeline register (IF/ID, ID/EX, EX/MEM or MEM/WB).
//
// A bank of flip-flops of any packed type T between two stages.  On a rising
// edge it loads d when en is 1 and holds its value when en is 0 (a stalled
// stage keeps its instruction).  clr loads all zeros, which every pipeline
// struct defines as a bubble (a nop with valid, RegWr and MemWr at 0); clr
// wins over en.  rst also loads the bubble.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (en)    q <= d;
  end

endmodule

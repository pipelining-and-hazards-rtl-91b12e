// hilo_unit: the HI/LO register pair with its multiplier and divider, in EX.
//
// MULT/MULTU put the 64-bit product of rs and rt in {HI, LO}; DIV/DIVU put
// the quotient in LO and the remainder in HI; MTHI/MTLO copy rs into one of
// the two.  The instruction in EX gives op, a (forwarded rs) and b (forwarded
// rt); the pair is written on the rising edge that ends EX, and hi/lo show
// the current contents, which MFHI/MFLO read in EX as their result.
// Because both the writers and the readers use the pair in the same stage
// and the pipeline is in order, a reader always sees the newest value with
// no stall and no forwarding.
//
// Both products and quotients are computed combinationally within the cycle:
// one 33x33-bit signed multiplier (operands sign- or zero-extended by op) and
// one 32-bit unsigned divider working on magnitudes, whose results get their
// signs back for DIV (quotient negative when the signs differ, remainder with
// the dividend's sign).  The instruction names come from the MIPS
// instruction set; the single-cycle arithmetic, the stage where HI/LO live
// and the result of a division by zero (LO = all ones, HI = dividend; MIPS
// leaves it undefined) are this design's own choices.  A bubble has
// op = MD_NONE and leaves the pair unchanged.  Synchronous reset clears it.
module hilo_unit
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  md_op_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  hi,
  output word_t  lo
);

  // Multiplier
  logic              msigned;
  logic signed [32:0] ma, mb;
  logic signed [63:0] prod;      // low 64 bits of the 66-bit product
  assign msigned = (op == MD_MULT);
  assign ma   = {msigned & a[31], a};
  assign mb   = {msigned & b[31], b};
  assign prod = ma * mb;

  // Divider on magnitudes
  logic  dsigned, a_neg, b_neg;
  word_t ua, ub, uq, ur, q, r;
  assign dsigned = (op == MD_DIV);
  assign a_neg   = dsigned & a[31];
  assign b_neg   = dsigned & b[31];
  assign ua      = a_neg ? -a : a;
  assign ub      = b_neg ? -b : b;

  always_comb begin
    if (ub == '0) begin
      uq = '1;
      ur = ua;
    end else begin
      uq = ua / ub;
      ur = ua % ub;
    end
  end

  always_comb begin
    if (b == '0) begin
      q = '1;
      r = a;
    end else begin
      q = (a_neg ^ b_neg) ? -uq : uq;
      r = a_neg ? -ur : ur;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi <= '0;
      lo <= '0;
    end else begin
      unique case (op)
        MD_MULT, MD_MULTU: {hi, lo} <= prod;
        MD_DIV, MD_DIVU:   begin lo <= q; hi <= r; end
        MD_MTHI:           hi <= a;
        MD_MTLO:           lo <= a;
        default: ;
      endcase
    end
  end

endmodule

// alu: the arithmetic unit of the MIPS-lite datapath.
//
// Result = A + B, A - B or A | B as ALUctr selects (ADD, SUB, OR). The zero
// output is 1 when Result is all zeros; with ALUctr = SUB this is the
// equality test A == B that beq needs. Addition and subtraction are modulo
// 2^32 (addu/subu do not trap on overflow). Combinational.
module alu
  import mips_lite_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  aluctr_e aluctr,
  output word_t   result,
  output logic    zero
);
  always_comb begin
    unique case (aluctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule

// extender: widens the 16-bit immediate of an I-format instruction to 32 bits.
//
// ExtOp = 0 fills the upper half with zeros (ori); ExtOp = 1 copies bit 15
// into the upper half (lw, sw). Combinational.
module extender
  import mips_lite_pkg::*;
(
  input  logic [15:0] imm16,
  input  logic        extop,
  output word_t       imm32
);
  always_comb imm32 = {{16{extop & imm16[15]}}, imm16};
endmodule

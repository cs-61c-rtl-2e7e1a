// mux2: two-input multiplexer, WIDTH bits wide.
//
// Y = A when Select is 0, Y = B when Select is 1. Purely combinational. The
// single-cycle CPU uses it wherever an input must be chosen by instruction:
// the register to write (RegDst), the second ALU operand (ALUSrc), the value
// written back (MemtoReg) and the next PC. The width default of 32 matches
// the 32-bit buses of the datapath.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] a,    // selected when sel = 0
  input  logic [WIDTH-1:0] b,    // selected when sel = 1
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? b : a;
endmodule

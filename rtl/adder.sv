// adder: WIDTH-bit binary adder with carry in and carry out.
//
// {CarryOut, Sum} = A + B + CarryIn, combinational. The next-address logic
// of the CPU uses two of them: PC + 4 and (PC + 4) + branch offset. The
// behavioural '+' leaves the choice of carry structure to synthesis; a
// ripple chain of one-bit full adders computes the same function.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  always_comb {cout, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, cin};
endmodule

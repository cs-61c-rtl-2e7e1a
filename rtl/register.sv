// register: N-bit state element with a write enable.
//
// On a rising clock edge with we = 1 the value on d appears on q; with
// we = 0 q keeps its value. A synchronous active-low reset clears q; the
// reset is this design's addition so that the PC starts at a known value.
// Timing: q changes only at the rising edge of clk (clk-to-q after it).
module register #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end
endmodule

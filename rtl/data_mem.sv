// data_mem: data memory of the single-cycle CPU (the idealised memory).
//
// Read: Data Out = MEM[Address], combinational, whatever Write Enable is.
// Write: on a rising clock edge with Write Enable = 1, Data In is stored at
// Address. The clock matters only for writing. Memory is WORDS words of
// WIDTH bits; Address is a byte address whose two low bits are ignored and
// whose bits above the word index wrap around (the depth and this
// addressing are this design's choices; contents are not reset).
module data_mem #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= din;
  end

  always_comb dout = mem[addr[AW+1:2]];
endmodule

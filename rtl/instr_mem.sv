// instr_mem: instruction memory of the single-cycle CPU.
//
// An idealised memory read combinationally: instr = MEM[addr] a short access
// time after addr (the PC) is valid, no clock involved. Memory is organised
// as WORDS 32-bit words; addr is a byte address whose two low bits are
// ignored and whose bits above the word index wrap around.
//
// The write port (we, waddr, wdata) is this design's addition: it loads the
// program before the processor runs, one word per rising clock edge. The
// CPU never writes its own instruction memory.
module instr_mem
  import mips_lite_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk,
  input  word_t addr,
  output word_t instr,
  input  logic  we,
  input  word_t waddr,
  input  word_t wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  always_comb instr = mem[addr[AW+1:2]];
endmodule

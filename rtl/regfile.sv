// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// busA = R[RA] and busB = R[RB] are combinational reads: they follow RA and
// RB after the access time, with no clock involved. On a rising clock edge
// with we (RegWr) = 1, busW is written into R[RW]; the new value is seen on
// the read ports after that edge, so an instruction that reads and writes
// the same register reads the old value in its own cycle.
//
// This design's choices: register 0 always reads as zero and ignores writes
// (as the MIPS $zero register does), a synchronous active-low reset clears
// every register, and a third read port (dbg_ra/dbg_rdata) lets a test or
// a debugger observe the registers.
module regfile
  import mips_lite_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         busw,
  output logic [WIDTH-1:0]         busa,
  output logic [WIDTH-1:0]         busb,
  input  logic [$clog2(NREGS)-1:0] dbg_ra,
  output logic [WIDTH-1:0]         dbg_rdata
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa      = (ra     == '0) ? '0 : regs[ra];
    busb      = (rb     == '0) ? '0 : regs[rb];
    dbg_rdata = (dbg_ra == '0) ? '0 : regs[dbg_ra];
  end
endmodule

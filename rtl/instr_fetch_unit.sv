// instr_fetch_unit: PC register, instruction memory and next-address logic.
//
// Each cycle the instruction at Mem[PC] is presented on instr; at the rising
// clock edge (when pc_we = 1) the PC takes the next address: PC + 4, or
// PC + 4 + (sign_ext(imm16) || 00) when nPC_sel and zero are both 1. imm16
// is taken from the instruction being fetched. The unit matches the fetch
// unit diagram: the PC drives both the instruction memory address and the
// next-address logic.
//
// This design's additions: a synchronous reset that sets the PC to 0, a PC
// write enable that stalls fetch (used while a program is loaded), and the
// program-load port of the instruction memory.
module instr_fetch_unit
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pc_we,
  input  logic  npc_sel,
  input  logic  zero,
  input  logic  load_we,
  input  word_t load_addr,
  input  word_t load_data,
  output word_t pc,
  output word_t instr
);
  word_t  npc;
  itype_t fields;

  register #(.N(XLEN)) u_pc (
    .clk(clk), .rst_n(rst_n), .we(pc_we), .d(npc), .q(pc));

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .addr(pc), .instr(instr),
    .we(load_we), .waddr(load_addr), .wdata(load_data));

  always_comb fields = itype_t'(instr);

  next_pc_logic u_npc (
    .pc(pc), .imm16(fields.imm16), .npc_sel(npc_sel), .zero(zero), .npc(npc));
endmodule

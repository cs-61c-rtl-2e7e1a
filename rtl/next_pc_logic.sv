// next_pc_logic: the next-address logic of the instruction fetch unit.
//
//   PC+4     = PC + 4                                (first adder)
//   branch   = PC+4 + (sign_ext(imm16) || 00)        (PC Ext, second adder)
//   nextPC   = (nPC_sel AND zero) ? branch : PC+4    (AND gate, 2:1 mux)
//
// nPC_sel is 1 for beq and zero is the ALU's equality result, so the branch
// target is taken only when a beq finds its two registers equal. All of this
// structure follows the fetch-unit diagram; it is combinational.
module next_pc_logic
  import mips_lite_pkg::*;
(
  input  word_t       pc,
  input  logic [15:0] imm16,
  input  logic        npc_sel,
  input  logic        zero,
  output word_t       npc
);
  word_t pc_plus4, pc_ext, pc_branch;
  logic  take_branch;
  logic  cout_seq, cout_br;   // carries out of the 32-bit address adders

  // PC Ext: sign extend imm16 and multiply by 4
  always_comb pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.WIDTH(XLEN)) u_add_seq (
    .a(pc), .b(32'd4), .cin(1'b0), .sum(pc_plus4), .cout(cout_seq));

  adder #(.WIDTH(XLEN)) u_add_br (
    .a(pc_plus4), .b(pc_ext), .cin(1'b0), .sum(pc_branch), .cout(cout_br));

  always_comb take_branch = npc_sel & zero;

  mux2 #(.WIDTH(XLEN)) u_npc_mux (
    .sel(take_branch), .a(pc_plus4), .b(pc_branch), .y(npc));
endmodule

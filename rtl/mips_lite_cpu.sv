// mips_lite_cpu: single-cycle MIPS-lite processor (top level).
//
// Executes the six-instruction MIPS-lite subset -- addu, subu, ori, lw, sw,
// beq -- completing one instruction every clock cycle. In that cycle the
// five phases run back to back as combinational logic: fetch Mem[PC],
// decode fields and read rs/rt, execute in the ALU, access data memory,
// and at the closing rising edge write the register file / data memory and
// load the next PC. The clock period must therefore cover the slowest
// instruction (lw, which uses all five phases).
//
//   instr_fetch_unit : PC, instruction memory, next-address logic
//   control          : op/funct -> RegDst, RegWr, ExtOp, ALUSrc, ALUctr,
//                      MemWr, MemtoReg, nPC_sel
//   datapath         : register file, extender, ALU, data memory
// The ALU's zero flag returns to the fetch unit, where nPC_sel AND zero
// picks the branch target.
//
// Separate instruction and data memories follow the processor description;
// their depths, the reset (PC and registers to 0), the run input that
// freezes all state, the program-load port and the debug register port are
// this design's own. Instructions and data are 32-bit words at byte
// addresses that are multiples of 4.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,
  input  logic     imem_load_we,
  input  word_t    imem_load_addr,
  input  word_t    imem_load_data,
  output word_t    pc,
  output word_t    instr,
  input  reg_idx_t dbg_ra,
  output word_t    dbg_rdata
);
  ctrl_t  ctrl;
  logic   zero;
  rtype_t f;

  instr_fetch_unit #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk(clk), .rst_n(rst_n), .pc_we(run),
    .npc_sel(ctrl.npc_sel), .zero(zero),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data),
    .pc(pc), .instr(instr));

  always_comb f = rtype_t'(instr);

  control u_ctrl (.op(f.op), .funct(f.funct), .ctrl(ctrl));

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk(clk), .rst_n(rst_n), .en(run), .instr(instr), .ctrl(ctrl),
    .zero(zero), .dbg_ra(dbg_ra), .dbg_rdata(dbg_rdata));
endmodule

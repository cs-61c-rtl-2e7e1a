// datapath: register file, extender, ALU and data memory of MIPS-lite.
//
// Wiring (one instruction per cycle, all combinational except the writes):
//   RW   = RegDst ? rd : rt          RA = rs, RB = rt
//   B    = ALUSrc ? ext(imm16) : busB, ext by ExtOp (zero/sign)
//   ALU  : A = busA, result and zero under ALUctr
//   MEM  : Address = ALU result, Data In = busB, Write Enable = MemWr
//   busW = MemtoReg ? Data Out : ALU result
// The register file and the data memory are written at the rising clock
// edge that ends the instruction. zero goes to the fetch unit for beq.
//
// The en input is this design's addition: when 0 it blocks both writes so
// the processor state holds still (while a program is loaded).
module datapath
  import mips_lite_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  word_t    instr,
  input  ctrl_t    ctrl,
  output logic     zero,
  input  reg_idx_t dbg_ra,
  output word_t    dbg_rdata
);
  rtype_t   f;
  reg_idx_t rw;
  word_t    busa, busb, busw, imm32, alu_b, alu_out, mem_out;

  always_comb f = rtype_t'(instr);

  mux2 #(.WIDTH(RIDX)) u_regdst_mux (
    .sel(ctrl.reg_dst), .a(f.rt), .b(f.rd), .y(rw));

  regfile #(.NREGS(NREG), .WIDTH(XLEN)) u_rf (
    .clk(clk), .rst_n(rst_n), .we(ctrl.reg_wr & en),
    .ra(f.rs), .rb(f.rt), .rw(rw), .busw(busw),
    .busa(busa), .busb(busb), .dbg_ra(dbg_ra), .dbg_rdata(dbg_rdata));

  extender u_ext (
    .imm16(instr[15:0]), .extop(ctrl.ext_op), .imm32(imm32));

  mux2 #(.WIDTH(XLEN)) u_alusrc_mux (
    .sel(ctrl.alu_src), .a(busb), .b(imm32), .y(alu_b));

  alu u_alu (
    .a(busa), .b(alu_b), .aluctr(ctrl.alu_ctr), .result(alu_out), .zero(zero));

  data_mem #(.WORDS(DMEM_WORDS), .WIDTH(XLEN)) u_dmem (
    .clk(clk), .we(ctrl.mem_wr & en), .addr(alu_out), .din(busb), .dout(mem_out));

  mux2 #(.WIDTH(XLEN)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg), .a(alu_out), .b(mem_out), .y(busw));
endmodule

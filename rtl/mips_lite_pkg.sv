// mips_lite_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// The MIPS-lite subset has six instructions: addu, subu (R-format), ori, lw,
// sw, beq (I-format). The instruction formats below, with their bit
// positions, are those of the MIPS ISA:
//   R-format: op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
//   I-format: op[31:26] rs[25:21] rt[20:16] imm16[15:0]
// Splitting an instruction into its fields ("wires and splitters") is done by
// casting the 32-bit word to one of the packed structs below.
//
// The opcode and funct numbers are the standard MIPS encodings; the 2-bit
// ALUctr encoding and the layout of the control bundle are this design's own.
package mips_lite_pkg;

  localparam int unsigned XLEN = 32;   // data path width
  localparam int unsigned NREG = 32;   // architectural registers
  localparam int unsigned RIDX = 5;    // register number width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] reg_idx_t;

  // Opcodes (op field)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // funct field of R-format instructions
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // R-format and I-format field views of a 32-bit instruction
  typedef struct packed {
    logic [5:0] op;
    reg_idx_t   rs;
    reg_idx_t   rt;
    reg_idx_t   rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  typedef struct packed {
    logic [5:0]  op;
    reg_idx_t    rs;
    reg_idx_t    rt;
    logic [15:0] imm16;
  } itype_t;

  // ALU operations (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } aluctr_e;

  // Control points of the datapath
  //   reg_dst   : 0 -> write rt, 1 -> write rd
  //   reg_wr    : 1 -> write register file
  //   ext_op    : 0 -> zero extend imm16, 1 -> sign extend
  //   alu_src   : 0 -> busB, 1 -> extended imm16
  //   alu_ctr   : ADD, SUB, OR
  //   mem_wr    : 1 -> write data memory
  //   mem_to_reg: 0 -> ALU result, 1 -> memory data
  //   npc_sel   : 0 -> PC+4, 1 -> branch
  typedef struct packed {
    logic    reg_dst;
    logic    reg_wr;
    logic    ext_op;
    logic    alu_src;
    aluctr_e alu_ctr;
    logic    mem_wr;
    logic    mem_to_reg;
    logic    npc_sel;
  } ctrl_t;

endpackage

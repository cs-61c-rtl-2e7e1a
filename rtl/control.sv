// control: main decoder of the MIPS-lite CPU.
//
// Maps the op and funct fields of the current instruction to the datapath's
// control points. The values follow from each instruction's register
// transfer:
//
//            RegDst RegWr ExtOp ALUSrc ALUctr MemWr MemtoReg nPC_sel
//   addu       1      1     -     0     ADD     0      0       0
//   subu       1      1     -     0     SUB     0      0       0
//   ori        0      1     0     1     OR      0      0       0
//   lw         0      1     1     1     ADD     0      1       0
//   sw         -      0     1     1     ADD     1      -       0
//   beq        -      0     -     0     SUB     0      -       1
//
// Don't-care entries ('-') are driven as 0. Any other opcode or funct is
// this design's choice: it writes nothing and falls through to PC + 4 (a
// no-op). Combinational.
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
             alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0, npc_sel: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.npc_sel = 1'b1;
      end
      default: ;
    endcase
  end
endmodule

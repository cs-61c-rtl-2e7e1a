// tb_control: self-checking test of the main decoder.
// Every opcode with a set of funct values is checked against the expected
// control settings of each MIPS-lite instruction. Don't-care entries of the
// instruction's settings are not compared, except that an instruction that
// must not write (sw, beq, unknown) has RegWr = 0 and MemWr = 0.
module tb_control;
  import mips_lite_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] op, funct;
  ctrl_t      ctrl;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected settings; -1 = don't care
  task automatic expect_ctrl(input string nm, input int rdst, input int rwr, input int ext, input int asrc,
                             input int actr, input int mwr, input int m2r, input int npc);
    bit bad = 0;
    if (rdst >= 0 && ctrl.reg_dst    !== 1'(rdst)) bad = 1;
    if (rwr  >= 0 && ctrl.reg_wr     !== 1'(rwr))  bad = 1;
    if (ext  >= 0 && ctrl.ext_op     !== 1'(ext))  bad = 1;
    if (asrc >= 0 && ctrl.alu_src    !== 1'(asrc)) bad = 1;
    if (actr >= 0 && ctrl.alu_ctr    !== 2'(actr)) bad = 1;
    if (mwr  >= 0 && ctrl.mem_wr     !== 1'(mwr))  bad = 1;
    if (m2r  >= 0 && ctrl.mem_to_reg !== 1'(m2r))  bad = 1;
    if (npc  >= 0 && ctrl.npc_sel    !== 1'(npc))  bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s op=%h funct=%h ctrl=%b", nm, op, funct, ctrl);
    end
  endtask

  localparam int ADD = 0, SUB = 1, OR = 2;

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int k = 0; k < 8; k++) begin
        op = 6'(o);
        funct = (k == 0) ? 6'h21 : (k == 1) ? 6'h23 : 6'($urandom);
        #1;
        if (o == 0 && funct == 6'h21)      expect_ctrl("addu", 1, 1, -1, 0, ADD, 0, 0, 0);
        else if (o == 0 && funct == 6'h23) expect_ctrl("subu", 1, 1, -1, 0, SUB, 0, 0, 0);
        else if (o == 6'h0D)               expect_ctrl("ori",  0, 1, 0, 1, OR, 0, 0, 0);
        else if (o == 6'h23)               expect_ctrl("lw",   0, 1, 1, 1, ADD, 0, 1, 0);
        else if (o == 6'h2B)               expect_ctrl("sw",  -1, 0, 1, 1, ADD, 1, -1, 0);
        else if (o == 6'h04)               expect_ctrl("beq", -1, 0, -1, 0, SUB, 0, -1, 1);
        else                               expect_ctrl("other", -1, 0, -1, -1, -1, 0, -1, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_datapath: self-checking test of the datapath with the control signals
// driven by the bench.
// Random MIPS-lite instructions are applied one per clock together with the
// control settings the bench derives for them; the bench's reference model
// (mips_lite_iss_pkg) predicts the register written, the memory written and
// the zero flag. The written register is read back through the debug port
// one clock after the instruction, and zero is compared for every beq.
// The data memory is preset through the hierarchy so every load reads a
// known word.
module tb_datapath;
  import mips_lite_pkg::*;
  import mips_lite_iss_pkg::*;
  int checks = 0, failures = 0;
  logic     clk = 0, rst_n, en, zero;
  word_t    instr, dbg_rdata;
  ctrl_t    ctrl;
  reg_idx_t dbg_ra;
  iss #(256) m;

  datapath dut (.clk(clk), .rst_n(rst_n), .en(en), .instr(instr), .ctrl(ctrl), .zero(zero),
                .dbg_ra(dbg_ra), .dbg_rdata(dbg_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control settings written out here independently of the control block
  function automatic ctrl_t ctrl_for(input word_t ins);
    ctrl_t c = ctrl_t'('0);
    case (ins[31:26])
      6'h00: begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = (ins[5:0] == 6'h23) ? ALU_SUB : ALU_ADD; end
      6'h0D: begin c.reg_wr = 1; c.alu_src = 1; c.alu_ctr = ALU_OR; end
      6'h23: begin c.reg_wr = 1; c.ext_op = 1; c.alu_src = 1; c.mem_to_reg = 1; end
      6'h2B: begin c.ext_op = 1; c.alu_src = 1; c.mem_wr = 1; end
      6'h04: begin c.alu_ctr = ALU_SUB; c.npc_sel = 1; end
      default: ;
    endcase
    return c;
  endfunction

  function automatic word_t rand_instr();
    int k = int'($urandom % 6);
    int rs = int'($urandom % 8), rt = int'($urandom % 8), rd = int'($urandom % 8);
    case (k)
      0: return addu(rd, rs, rt);
      1: return subu(rd, rs, rt);
      2: return ori(rt, rs, int'($urandom % 65536));
      3: return lw(rt, int'($urandom % 65536), rs);
      4: return sw(rt, int'($urandom % 65536), rs);
      default: return beq(rs, ($urandom % 2) ? rs : rt, int'($urandom % 65536));
    endcase
  endfunction

  initial begin
    bit exp_zero;
    m = new();
    rst_n = 0; en = 0; instr = '0; ctrl = ctrl_t'('0); dbg_ra = 0;
    for (int i = 0; i < 256; i++) begin
      m.mem[i] = $urandom;
      dut.u_dmem.mem[i] = m.mem[i];
    end
    @(posedge clk);
    @(negedge clk);
    rst_n = 1; en = 1;
    for (int i = 0; i < 3000; i++) begin
      instr = (i < 16) ? ori(i % 8, 0, int'($urandom % 65536)) : rand_instr();
      ctrl = ctrl_for(instr);
      exp_zero = (m.r[instr[25:21]] == m.r[instr[20:16]]);
      #1;
      if (instr[31:26] == 6'h04) begin
        checks++;
        if (zero !== exp_zero) begin
          failures++;
          $display("FAIL beq zero=%0d expected %0d instr=%h", zero, exp_zero, instr);
        end
      end
      m.step(instr);
      @(posedge clk);
      @(negedge clk);
      if (m.wrote_reg) begin
        dbg_ra = reg_idx_t'(m.wreg);
        #1;
        checks++;
        if (dbg_rdata !== m.r[m.wreg]) begin
          failures++;
          $display("FAIL instr=%h R[%0d]=%h expected %h", instr, m.wreg, dbg_rdata, m.r[m.wreg]);
        end
      end
      if (m.wrote_mem) begin
        checks++;
        if (dut.u_dmem.mem[m.widx] !== m.mem[m.widx]) begin
          failures++;
          $display("FAIL instr=%h MEM[%0d]=%h expected %h", instr, m.widx, dut.u_dmem.mem[m.widx], m.mem[m.widx]);
        end
      end
    end
    // with en = 0 nothing may be written
    en = 0;
    instr = ori(1, 0, 16'h1234); ctrl = ctrl_for(instr);
    @(posedge clk); @(negedge clk);
    instr = sw(1, 0, 0); ctrl = ctrl_for(instr);
    @(posedge clk); @(negedge clk);
    dbg_ra = 1; #1;
    checks++;
    if (dbg_rdata !== m.r[1] || dut.u_dmem.mem[0] !== m.mem[0]) begin
      failures++;
      $display("FAIL write while en=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

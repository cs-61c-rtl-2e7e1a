// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite CPU at its
// default sizes (256-word instruction and data memories).
//
// Each program is loaded through the program-load port, the CPU is reset and
// run until it reaches a "beq $0,$0,-1" self-loop. In every cycle the PC is
// compared with a reference model (mips_lite_iss_pkg), and one clock after
// each register-writing instruction the written register is read back
// through the debug port: this checks the one-instruction-per-cycle timing.
// Stores are checked in the data memory after the edge. Cycles with run = 0
// are inserted at random; PC and state must hold through them.
//
//   1. a directed loop that stores, reloads and sums 5..1 (hand-computed
//      results: sum 15, last value 1, 0 - 0x8000 = 0xFFFF8000);
//   2. random programs of all six instructions with forward branches.
// Every mechanism (each instruction, branch taken / not taken, negative
// offsets, ori with bit 15 set, writes to register 0, stalls) must occur.
module tb_mips_lite_cpu;
  import mips_lite_pkg::*;
  import mips_lite_iss_pkg::*;

  localparam int NPROG = 12;

  int checks = 0, failures = 0, stalls = 0, cycles = 0;
  logic     clk = 0, rst_n, run, imem_load_we;
  word_t    imem_load_addr, imem_load_data, pc, instr, dbg_rdata;
  reg_idx_t dbg_ra;
  word_t    prog [256];
  int       ev_total [EV_COUNT];
  iss #(256) m;

  mips_lite_cpu dut (.clk(clk), .rst_n(rst_n), .run(run), .imem_load_we(imem_load_we),
                     .imem_load_addr(imem_load_addr), .imem_load_data(imem_load_data),
                     .pc(pc), .instr(instr), .dbg_ra(dbg_ra), .dbg_rdata(dbg_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam word_t HALT = 32'h1000_FFFF;   // beq $0,$0,-1

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic word_t reg_read(input int r);
    return m.r[r];
  endfunction

  task automatic run_program(input int max_cycles);
    m = new();
    // load the program
    run = 0; rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_load_we = 1; imem_load_addr = word_t'(i * 4); imem_load_data = prog[i];
    end
    // preset data memory with known random words
    for (int i = 0; i < 256; i++) begin
      m.mem[i] = $urandom;
      dut.u_dp.u_dmem.mem[i] = m.mem[i];
    end
    @(negedge clk);
    imem_load_we = 0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < max_cycles; c++) begin
      run = ($urandom % 10) != 0;
      #1;
      check(pc === m.pc, $sformatf("pc=%h expected %h", pc, m.pc));
      check(instr === prog[m.pc[9:2]], $sformatf("instr=%h expected %h", instr, prog[m.pc[9:2]]));
      if (!run) begin
        @(posedge clk); @(negedge clk);
        stalls++;
        check(pc === m.pc, "pc moved while run=0");
        continue;
      end
      if (instr === HALT) break;
      m.step(prog[m.pc[9:2]]);
      cycles++;
      @(posedge clk);
      @(negedge clk);
      if (m.wrote_reg) begin
        dbg_ra = reg_idx_t'(m.wreg);
        #1;
        check(dbg_rdata === m.r[m.wreg],
              $sformatf("R[%0d]=%h expected %h", m.wreg, dbg_rdata, m.r[m.wreg]));
      end
      if (m.wrote_mem)
        check(dut.u_dp.u_dmem.mem[m.widx] === m.mem[m.widx],
              $sformatf("MEM[%0d]=%h expected %h", m.widx, dut.u_dp.u_dmem.mem[m.widx], m.mem[m.widx]));
    end
    check(instr === HALT, "program did not reach its final self-loop");
    // all registers at the end
    run = 0;
    for (int r = 0; r < 32; r++) begin
      dbg_ra = reg_idx_t'(r);
      #1;
      check(dbg_rdata === m.r[r], $sformatf("final R[%0d]=%h expected %h", r, dbg_rdata, m.r[r]));
    end
    for (int e = 0; e < EV_COUNT; e++) ev_total[e] += m.events[e];
  endtask

  function automatic word_t rand_instr(input int pos, input int last);
    int k = int'($urandom % 7);
    int rs = int'($urandom % 8), rt = int'($urandom % 8), rd = int'($urandom % 8);
    int off = int'($urandom % 4);
    case (k)
      0: return addu(rd, rs, rt);
      1: return subu(rd, rs, rt);
      2, 6: return ori(rt, rs, int'($urandom % 65536));
      3: return lw(rt, int'($urandom % 65536), rs);
      4: return sw(rt, int'($urandom % 65536), rs);
      default: begin
        if (pos + 1 + off > last) off = last - pos - 1;
        return beq(rs, ($urandom % 2) ? rs : rt, off);
      end
    endcase
  endfunction

  initial begin
    foreach (ev_total[i]) ev_total[i] = 0;
    rst_n = 0; run = 0; imem_load_we = 0; imem_load_addr = 0; imem_load_data = 0; dbg_ra = 0;

    // ---- 1. directed program ----
    foreach (prog[i]) prog[i] = HALT;
    prog[0]  = ori(1, 0, 16'h8000);   // $1 = 0x00008000 (zero extended)
    prog[1]  = ori(2, 0, 5);          // counter
    prog[2]  = ori(3, 0, 1);          // one
    prog[3]  = ori(4, 0, 16'h40);     // pointer
    prog[4]  = addu(5, 0, 0);         // sum = 0
    prog[5]  = ori(7, 0, 4);          // four
    prog[6]  = sw(2, 0, 4);           // loop: MEM[ptr] = counter
    prog[7]  = lw(6, 0, 4);           //       $6 = MEM[ptr]
    prog[8]  = addu(5, 5, 6);         //       sum += $6
    prog[9]  = addu(4, 4, 7);         //       ptr += 4
    prog[10] = subu(2, 2, 3);         //       counter -= 1
    prog[11] = beq(2, 0, 1);          //       exit when counter == 0
    prog[12] = beq(0, 0, -7);         //       back to prog[6]
    prog[13] = lw(8, -4, 4);          // last stored value, negative offset
    prog[14] = addu(0, 5, 5);         // write to $0 is ignored
    prog[15] = subu(9, 0, 1);         // 0 - 0x8000
    prog[16] = sw(9, -8, 4);
    prog[17] = lw(10, -8, 4);
    prog[18] = HALT;
    run_program(1000);
    check(m.r[5] == 32'd15 && m.r[8] == 32'd1 && m.r[1] == 32'h0000_8000 &&
          m.r[10] == 32'hFFFF_8000 && m.r[0] == 0, "directed program hand-computed results");
    dbg_ra = 5; #1; check(dbg_rdata === 32'd15, $sformatf("sum register = %0d, expected 15", dbg_rdata));
    dbg_ra = 10; #1; check(dbg_rdata === 32'hFFFF_8000, "R10 expected FFFF8000");

    // ---- 2. random programs ----
    for (int p = 0; p < NPROG; p++) begin
      foreach (prog[i]) prog[i] = HALT;
      for (int i = 0; i < 8; i++) prog[i] = ori(i, 0, int'($urandom % 65536));
      for (int i = 8; i < 240; i++) prog[i] = rand_instr(i, 240);
      prog[240] = HALT;
      run_program(2000);
    end

    // ---- mechanism coverage ----
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %-18s : %0d", EV_NAMES[e], ev_total[e]);
      if (e != int'(EV_NOP)) check(ev_total[e] > 0, $sformatf("mechanism %s never happened", EV_NAMES[e]));
    end
    $display("mechanism %-18s : %0d", "STALL (run=0)", stalls);
    check(stalls > 0, "stall never happened");
    $display("instructions executed: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

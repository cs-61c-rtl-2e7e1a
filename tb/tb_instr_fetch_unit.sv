// tb_instr_fetch_unit: self-checking test of the instruction fetch unit.
// Loads 256 random words, resets, then for 2000 cycles drives random
// nPC_sel, zero and PC write enable. Each cycle instr must equal the loaded
// word at PC, and after each edge the PC must be PC + 4, the branch target
// (only when nPC_sel and zero), or unchanged when the write enable is 0.
// Counts of each kind of step are checked to be non-zero.
module tb_instr_fetch_unit;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n, pc_we, npc_sel, zero, load_we;
  logic [31:0] load_addr, load_data, pc, instr, model_pc;
  logic [31:0] prog [256];
  int          n_seq = 0, n_br = 0, n_hold = 0;

  instr_fetch_unit dut (.clk(clk), .rst_n(rst_n), .pc_we(pc_we), .npc_sel(npc_sel), .zero(zero),
                        .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
                        .pc(pc), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; pc_we = 0; npc_sel = 0; zero = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 32'(i * 4); load_data = $urandom;
      prog[i] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    @(posedge clk); #1;
    model_pc = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      npc_sel = 1'($urandom); zero = 1'($urandom); pc_we = ($urandom % 8) != 0;
      #1;
      checks++;
      if (pc !== model_pc || instr !== prog[model_pc[9:2]]) begin
        failures++;
        $display("FAIL pc=%h (exp %h) instr=%h (exp %h)", pc, model_pc, instr, prog[model_pc[9:2]]);
      end
      @(posedge clk); #1;
      if (!pc_we) n_hold++;
      else if (npc_sel && zero) begin
        model_pc = model_pc + 4 + {{14{prog[model_pc[9:2]][15]}}, prog[model_pc[9:2]][15:0], 2'b00};
        n_br++;
      end else begin
        model_pc = model_pc + 4;
        n_seq++;
      end
      checks++;
      if (pc !== model_pc) begin
        failures++;
        $display("FAIL after edge pc=%h expected %h", pc, model_pc);
      end
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage seq=%0d branch=%0d hold=%0d", n_seq, n_br, n_hold);
    end
    $display("fetch steps: sequential=%0d branch=%0d hold=%0d", n_seq, n_br, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

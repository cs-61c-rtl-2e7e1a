// tb_next_pc_logic: self-checking test of the next-address logic.
// Exhaustive over nPC_sel x zero (the truth table: branch only when both are
// 1) with random PCs and offsets, including negative offsets and address
// wrap-around.
module tb_next_pc_logic;
  int checks = 0, failures = 0;
  logic [31:0] pc, npc, exp_v;
  logic [15:0] imm16;
  logic        npc_sel, zero;

  next_pc_logic dut (.pc(pc), .imm16(imm16), .npc_sel(npc_sel), .zero(zero), .npc(npc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      pc = (i == 0) ? 32'hFFFF_FFFC : {$urandom} & 32'hFFFF_FFFC;
      imm16 = (i < 4) ? 16'hFFFF : 16'($urandom);
      npc_sel = i[0]; zero = i[1];
      #1;
      exp_v = pc + 32'd4;
      if (npc_sel && zero) exp_v = exp_v + (32'($signed(imm16)) * 4);
      checks++;
      if (npc !== exp_v) begin
        failures++;
        $display("FAIL pc=%h imm=%h sel=%0d zero=%0d npc=%h expected %h", pc, imm16, npc_sel, zero, npc, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

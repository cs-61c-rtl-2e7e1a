// tb_extender: self-checking test of the immediate extender.
// Every 16-bit immediate with both ExtOp values: ExtOp = 0 must give
// zero extension, ExtOp = 1 sign extension.
module tb_extender;
  int checks = 0, failures = 0;
  logic [15:0] imm16;
  logic        extop;
  logic [31:0] imm32, exp_v;

  extender dut (.imm16(imm16), .extop(extop), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i += 7) begin
      for (int e = 0; e < 2; e++) begin
        imm16 = 16'(i); extop = 1'(e);
        #1;
        exp_v = e ? 32'($signed(imm16)) : {16'h0, imm16};
        checks++;
        if (imm32 !== exp_v) begin
          failures++;
          $display("FAIL imm16=%h extop=%0d got %h expected %h", imm16, extop, imm32, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

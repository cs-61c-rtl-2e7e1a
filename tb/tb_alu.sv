// tb_alu: self-checking test of the ALU.
// ADD, SUB and OR on random and corner operands, with the zero flag checked
// each time; equal operands under SUB must raise zero (the beq test).
module tb_alu;
  import mips_lite_pkg::*;
  int checks = 0, failures = 0;
  word_t   a, b, result, exp_r;
  aluctr_e aluctr;
  logic    zero;

  alu dut (.a(a), .b(b), .aluctr(aluctr), .result(result), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input word_t ta, input word_t tb_, input aluctr_e op);
    a = ta; b = tb_; aluctr = op;
    #1;
    case (op)
      ALU_ADD: exp_r = ta + tb_;
      ALU_SUB: exp_r = ta - tb_;
      default: exp_r = ta | tb_;
    endcase
    checks++;
    if (result !== exp_r || zero !== (exp_r == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h result=%h zero=%0d expected %h", op.name(), ta, tb_, result, zero, exp_r);
    end
  endtask

  initial begin
    word_t r;
    try(32'd5, 32'd5, ALU_SUB);              // equal: zero = 1
    try(32'hFFFF_FFFF, 32'hFFFF_FFFF, ALU_SUB);
    try(32'd5, 32'd6, ALU_SUB);              // not equal, negative
    try(32'hFFFF_FFFF, 32'd1, ALU_ADD);      // wraps to zero
    try(32'h0, 32'h0, ALU_OR);
    try(32'h1234_0000, 32'h0000_5678, ALU_OR);
    // results that are zero in some bits only: zero must stay 0
    try(32'h0001_0000, 32'h0, ALU_SUB);
    try(32'h8000_0000, 32'h0, ALU_ADD);
    try(32'hFFFF_0000, 32'h0, ALU_OR);
    try(32'h0000_0001, 32'h0, ALU_SUB);
    for (int k = 0; k < 32; k++) try(32'h1 << k, 32'h0, aluctr_e'(k % 3));
    for (int i = 0; i < 300; i++) begin
      r = $urandom;
      try(r, (i % 5 == 0) ? r : word_t'($urandom), aluctr_e'(i % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

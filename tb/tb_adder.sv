// tb_adder: self-checking test of the 32-bit adder with carry in/out.
// Random operands plus corner cases (all ones, carry propagation across all
// 32 bits); the 33-bit expected sum is computed in the bench.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  logic [32:0] exp_v;

  adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc;
    #1;
    exp_v = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL %h + %h + %0d = %0d:%h, expected %h", ta, tb_, tc, cout, sum, exp_v);
    end
  endtask

  initial begin
    try(32'hFFFF_FFFF, 32'h0, 1'b1);
    try(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    try(32'h7FFF_FFFF, 32'h1, 1'b0);
    try(32'h0, 32'h0, 1'b0);
    try(32'h0000_0004, 32'hFFFF_FFF8, 1'b0);
    for (int i = 0; i < 300; i++) try($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_register: self-checking test of the write-enabled register.
// Drives random data with a random write enable each cycle and checks q
// after every rising edge against a model: reset clears, we=1 loads,
// we=0 holds.
module tb_register;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n, we;
  logic [31:0] d, q, model;

  register dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; d = '1;
    @(posedge clk); #1;
    model = '0;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d  = $urandom;
      we = ($urandom % 3) != 0;
      // the output must not change between edges
      #2;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q changed before edge: %h", q); end
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d we=%0d d=%h q=%h expected %h", i, we, d, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_instr_mem: self-checking test of the instruction memory.
// Loads every word through the load port, then reads them back
// combinationally at random PCs, and checks that a load with we = 0 changes
// nothing.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [31:0] addr, instr, waddr, wdata;
  logic [31:0] model [256];

  instr_mem dut (.clk(clk), .addr(addr), .instr(instr), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 32'(i * 4); wdata = $urandom;
      @(posedge clk);
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 50; i++) begin     // writes disabled: nothing stored
      waddr = 32'(($urandom % 256) * 4); wdata = $urandom;
      @(posedge clk); @(negedge clk);
    end
    for (int i = 0; i < 600; i++) begin
      addr = (i < 256) ? 32'(i * 4) : 32'(($urandom % 256) * 4);
      #1;
      checks++;
      if (instr !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL addr=%h got %h expected %h", addr, instr, model[addr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

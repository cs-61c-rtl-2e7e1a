// tb_data_mem: self-checking test of the data memory.
// Writes happen only at a rising edge with we = 1; reads are combinational
// and valid with we = 0 or 1. A model array covers the touched words; a
// word is compared only after it has been written.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [256];
  bit          valid [256];

  data_mem dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [31:0] a);
    int w = int'(a[9:2]);
    addr = a;
    #1;
    if (valid[w]) begin
      checks++;
      if (dout !== model[w]) begin
        failures++;
        $display("FAIL read addr=%h got %h expected %h", a, dout, model[w]);
      end
    end
  endtask

  initial begin
    we = 0; addr = 0; din = 0;
    foreach (valid[i]) valid[i] = 0;
    // write every word once
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); din = $urandom;
      @(posedge clk);
      model[i] = din; valid[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) check_read(32'(i * 4));
    // random mix; while we=0 a changing din must not be stored
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; addr = {22'($urandom), 8'($urandom) & 8'hFC}; din = $urandom;
      #1;
      checks++;
      if (dout !== model[addr[9:2]]) begin   // read before the edge: old contents
        failures++;
        $display("FAIL pre-edge read addr=%h got %h expected %h", addr, dout, model[addr[9:2]]);
      end
      @(posedge clk);
      if (we) model[addr[9:2]] = din;
      check_read(addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

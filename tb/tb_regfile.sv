// tb_regfile: self-checking test of the 32 x 32 register file.
// After reset every register must read 0. Then random writes and reads are
// compared with a model array: reads are combinational, a write lands at the
// rising edge, and register 0 stays 0.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n, we;
  logic [4:0]  ra, rb, rw, dbg_ra;
  logic [31:0] busw, busa, busb, dbg_rdata;
  logic [31:0] model [32];

  regfile dut (.clk(clk), .rst_n(rst_n), .we(we), .ra(ra), .rb(rb), .rw(rw),
               .busw(busw), .busa(busa), .busb(busb), .dbg_ra(dbg_ra), .dbg_rdata(dbg_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks++;
    if (busa !== model[ra] || busb !== model[rb] || dbg_rdata !== model[dbg_ra]) begin
      failures++;
      $display("FAIL ra=%0d busA=%h (exp %h) rb=%0d busB=%h (exp %h) dbg=%0d %h (exp %h)",
               ra, busa, model[ra], rb, busb, model[rb], dbg_ra, dbg_rdata, model[dbg_ra]);
    end
  endtask

  initial begin
    rst_n = 0; we = 0; ra = 0; rb = 0; rw = 0; busw = 0; dbg_ra = 0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); dbg_ra = 5'(i);
      check_reads();
    end
    // fill every register, including an attempt to write register 0
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; rw = 5'(i); busw = $urandom;
      ra = 5'(i); rb = 5'(i); dbg_ra = 5'(i);
      check_reads();                      // old value until the edge
      @(posedge clk);
      if (i != 0) model[i] = busw;
      check_reads();
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      ra = 5'($urandom); rb = (i % 4 == 0) ? rw : 5'($urandom); dbg_ra = 5'($urandom);
      check_reads();
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

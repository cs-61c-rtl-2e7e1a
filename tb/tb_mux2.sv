// tb_mux2: self-checking test of the 2:1 multiplexer.
// Random A, B and Select at the default 32-bit width; the expected Y is
// worked out in the bench. A watchdog ends a hung run.
module tb_mux2;
  int checks = 0, failures = 0;
  logic        sel;
  logic [31:0] a, b, y;

  mux2 dut (.sel(sel), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; sel = i[0] ^ i[3];
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%0d a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

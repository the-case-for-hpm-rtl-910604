// tb_full_adder: exhaustive check of the 3:2 counter cell. All eight input
// combinations; the expected two-bit count is a + b + c.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a + b + c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> co=%0b s=%0b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

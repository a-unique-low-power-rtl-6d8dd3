// tb_full_adder: exhaustive check of the full adder. For all eight input
// combinations the outputs must satisfy a + b + ci = s + 2*co, with the
// expected value taken from integer addition.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != total) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b s=%0b co=%0b", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

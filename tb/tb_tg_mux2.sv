// tb_tg_mux2: exhaustive check of the transmission-gate multiplexer with
// complementary selects (s_n = ~s): y must follow d0 when s is low and d1
// when s is high.
module tb_tg_mux2;
  logic d0, d1, s, y;
  int checks = 0, failures = 0;

  tg_mux2 dut (.d0(d0), .d1(d1), .s(s), .s_n(~s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expect_y;
      {s, d1, d0} = 3'(v);
      expect_y = (v >= 4) ? ((v >> 1) & 1) == 1 : (v & 1) == 1;
      #1;
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL s=%0b d1=%0b d0=%0b y=%0b", s, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

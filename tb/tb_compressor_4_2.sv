// tb_compressor_4_2: exhaustive check of the 4-2 compressor.
// For all 32 input combinations:
//   - x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)  (integer arithmetic)
//   - cout is independent of cin (the property that stops a row of chained
//     compressors from rippling): cout must be the same for cin = 0 and 1.
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int c = 0; c < 2; c++) begin
        int total;
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + c;
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
          failures++;
          $display("FAIL x=%04b cin=%0b sum=%0b carry=%0b cout=%0b",
                   4'(v), cin, sum, carry, cout);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%04b", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pp_gen: checks the 8 x 8 partial-product generator. For 2000 random
// operand pairs plus the corner values 0 and 255, each row j must equal
// (b[j] ? a : 0) << j computed here, and the rows must add up to a * b.
module tb_pp_gen;
  localparam int unsigned N = 8;
  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] va, logic [N-1:0] vb);
    int unsigned total = 0;
    a = va;
    b = vb;
    #1;
    for (int j = 0; j < N; j++) begin
      logic [2*N-1:0] row = vb[j] ? (2*N)'(va) << j : '0;
      total += pp[j];
      checks++;
      if (pp[j] !== row) begin
        failures++;
        $display("FAIL a=%0d b=%0d row %0d = %h, expected %h", va, vb, j, pp[j], row);
      end
    end
    checks++;
    if (total != int'(va) * int'(vb)) begin
      failures++;
      $display("FAIL a=%0d b=%0d rows sum to %0d", va, vb, total);
    end
  endtask

  initial begin
    apply(8'd0, 8'd0);
    apply(8'd255, 8'd255);
    apply(8'd255, 8'd0);
    apply(8'd0, 8'd255);
    for (int t = 0; t < 2000; t++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

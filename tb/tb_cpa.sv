// tb_cpa: checks the 13-bit ripple-carry adder against integer addition for
// 5000 random operand pairs and the corners that exercise the whole carry
// chain (all ones plus one, all ones plus all ones). It also counts how
// often a carry ran the full length of the chain and fails if it never did.
module tb_cpa;
  localparam int unsigned W = 13;
  logic [W-1:0] a, b, s;
  logic         co;
  int checks = 0, failures = 0;
  int full_ripples = 0;

  cpa dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb);
    logic [W:0] want = (W+1)'(va) + (W+1)'(vb);
    a = va;
    b = vb;
    #1;
    checks++;
    if ({co, s} !== want) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, got %0d", va, vb, want, {co, s});
    end
    if (va == '1 && vb == W'(1)) full_ripples++;
  endtask

  initial begin
    apply('1, W'(1));
    apply(W'(1), '1);
    apply('1, '1);
    apply('0, '0);
    for (int t = 0; t < 5000; t++) apply(W'($urandom), W'($urandom));
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple exercised");
    end
    $display("full-length carry ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

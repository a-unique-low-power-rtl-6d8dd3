// tb_reduction_stage: checks two configurations of the reduction stage with
// random rows restricted to their declared live bit ranges.
//   u_a: the defaults, partial-product rows 0..3 of an 8 x 8 multiplier.
//        The sum row must stay within bits 0..10 and the carry row within
//        bits 2..10, the ranges the multiplier hands to its next stage.
//   u_b: the second stage of the multiplier (rows live in 0..10, 2..10,
//        4..14, 6..14); sum row within 0..14, carry row within 3..15.
// Both must satisfy s_row + c_row = sum of the four rows (mod 2^16). The
// bench also counts inputs for which a compressor passed a 1 on its cout to
// the next column and fails if that never happened in either instance.
module tb_reduction_stage;
  localparam int unsigned W = 16;
  typedef logic [3:0][W-1:0] rows_t;

  rows_t         ra, rb;
  logic [W-1:0]  sa, ca, sb, cb;
  int checks = 0, failures = 0;
  int chain_a = 0, chain_b = 0;

  reduction_stage u_a (.in_rows(ra), .s_row(sa), .c_row(ca));
  reduction_stage #(
    .W(W), .LO('{0, 2, 4, 6}), .HI('{10, 10, 14, 14})
  ) u_b (.in_rows(rb), .s_row(sb), .c_row(cb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] range_mask(int lo, int hi);
    logic [W-1:0] m = '0;
    for (int i = lo; i <= hi; i++) m[i] = 1'b1;
    return m;
  endfunction

  function automatic int unsigned row_sum(rows_t r);
    int unsigned t = 0;
    for (int k = 0; k < 4; k++) t += r[k];
    return t;
  endfunction

  task automatic check_out(string tag, rows_t r, logic [W-1:0] s, logic [W-1:0] c,
                           logic [W-1:0] s_mask, logic [W-1:0] c_mask);
    int unsigned want = row_sum(r) % (1 << W);
    int unsigned got  = (int'(s) + int'(c)) % (1 << W);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: rows sum %0d, s+c %0d", tag, want, got);
    end
    checks++;
    if ((s & ~s_mask) != '0 || (c & ~c_mask) != '0) begin
      failures++;
      $display("FAIL %s: output outside its range s=%h c=%h", tag, s, c);
    end
  endtask

  task automatic apply(rows_t va, rows_t vb);
    ra = va;
    rb = vb;
    #1;
    check_out("stage1", va, sa, ca, range_mask(0, 10), range_mask(2, 10));
    check_out("stage2", vb, sb, cb, range_mask(0, 14), range_mask(3, 15));
    if (u_a.cout_w != '0) chain_a++;
    if (u_b.cout_w != '0) chain_b++;
  endtask

  initial begin
    rows_t va, vb;
    int la [4] = '{0, 1, 2, 3};
    int ha [4] = '{7, 8, 9, 10};
    int lb [4] = '{0, 2, 4, 6};
    int hb [4] = '{10, 10, 14, 14};
    // All live bits set, then all clear.
    for (int k = 0; k < 4; k++) begin
      va[k] = range_mask(la[k], ha[k]);
      vb[k] = range_mask(lb[k], hb[k]);
    end
    apply(va, vb);
    apply('0, '0);
    for (int t = 0; t < 5000; t++) begin
      for (int k = 0; k < 4; k++) begin
        va[k] = W'($urandom) & range_mask(la[k], ha[k]);
        vb[k] = W'($urandom) & range_mask(lb[k], hb[k]);
      end
      apply(va, vb);
    end
    checks++;
    if (chain_a == 0 || chain_b == 0) begin
      failures++;
      $display("FAIL compressor cout chain never carried a 1");
    end
    $display("cout chain active: stage1 %0d, stage2 %0d", chain_a, chain_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

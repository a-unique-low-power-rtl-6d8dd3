// tb_wallace42_mult: end-to-end test of the 8 x 8 multiplier at its only
// configuration. Every one of the 65536 operand pairs is applied and the
// product compared with integer multiplication. Along the way it checks the
// row ranges each stage promises the next one and counts the mechanisms the
// tree relies on, failing if one of them never occurs:
//   - a 1 passed along the cout -> cin chain of a stage-1 compressor row,
//   - the same in the stage-2 compressor row,
//   - a 1 in the stage-2 carry row reaching the final adder,
//   - a carry running through at least 8 bits of the final adder,
//   - the two all-ones operands (largest product, every column full).
module tb_wallace42_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_chain1 = 0, n_chain2 = 0, n_cpa_in = 0, n_long_ripple = 0, n_max = 0;

  wallace42_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int longest_run(logic [12:0] v);
    int best = 0, run = 0;
    for (int i = 0; i < 13; i++) begin
      run  = v[i] ? run + 1 : 0;
      best = run > best ? run : best;
    end
    return best;
  endfunction

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int unsigned want;
        want = ia * ib;
        a = 8'(ia);
        b = 8'(ib);
        #1;
        checks++;
        if (p !== 16'(want)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", ia, ib, want, p);
        end
        checks++;
        if ((dut.s1a & ~16'h07ff) != 0 || (dut.c1a & ~16'h07fc) != 0 ||
            (dut.s1b & ~16'h7ff0) != 0 || (dut.c1b & ~16'h7fc0) != 0 ||
            (dut.s2  & ~16'h7fff) != 0 || (dut.c2  & ~16'hfff8) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL stage row out of range for %0d * %0d", ia, ib);
        end
        if (dut.u_s1a.cout_w != 0 || dut.u_s1b.cout_w != 0) n_chain1++;
        if (dut.u_s2.cout_w != 0) n_chain2++;
        if (dut.c2 != 0) n_cpa_in++;
        if (longest_run(dut.u_cpa.carry) >= 8) n_long_ripple++;
        if (ia == 255 && ib == 255) n_max++;
      end
    end
    checks++;
    if (n_chain1 == 0 || n_chain2 == 0 || n_cpa_in == 0 || n_long_ripple == 0 || n_max == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("stage1 cout chain %0d, stage2 cout chain %0d, carry row into adder %0d, 8+ bit ripples %0d, max operands %0d",
             n_chain1, n_chain2, n_cpa_in, n_long_ripple, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

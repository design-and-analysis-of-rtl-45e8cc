// tb_compressor_15_4: end-to-end self-check of compressor_15_4 at its only
// configuration, over all 2^15 input patterns.
//
// The reference model is arithmetic, not a copy of the netlist: for each
// group of three inputs the number of ones gives the first-stage sum (count
// mod 2) and carry (count div 2); each set of five is reduced by the 5:3 rule
// (parity, then majority of the first three plus the fifth as a two-bit
// number); the result is a + 2*b + 1. The low output bit must also be the
// complement of the input parity.
//
// Mechanisms that must each occur at least once: a carry out of the final
// adder, the weight-4 output of each 5:3 compressor, and a result whose low
// bit is 0 (an odd input count). How often the output equals the true count
// of ones is reported for information.
module tb_compressor_15_4;
  logic [14:0] i;
  logic [3:0]  s;
  logic        carry;
  int checks = 0, failures = 0;
  int n_carry_out = 0, n_sum_w4 = 0, n_carry_w4 = 0, n_odd = 0, n_exact = 0;

  compressor_15_4 dut (.i(i), .s(s), .carry(carry));

  // 5:3 rule: returns {w4, w2, w1}
  function automatic int unsigned rule_5_3(input logic [4:0] v);
    int unsigned maj3, h;
    maj3 = (int'(v[0]) + int'(v[1]) + int'(v[2]) >= 2) ? 1 : 0;
    h    = maj3 + int'(v[4]);
    return 4 * (h / 2) + 2 * (h % 2) + ($countones(v) % 2);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 15); v++) begin
      logic [4:0] sums, cys;
      int unsigned a, b, want;
      i = 15'(v);
      for (int k = 0; k < 5; k++) begin
        int cnt;
        cnt = $countones(i[3*k +: 3]);
        sums[k] = 1'(cnt % 2);
        cys[k]  = 1'(cnt / 2);
      end
      a = rule_5_3(sums);
      b = rule_5_3(cys);
      want = a + 2 * b + 1;
      #1;
      checks++;
      if (int'({carry, s}) != int'(want)) begin
        failures++;
        if (failures < 10)
          $display("FAIL i=%015b -> %0d, expected %0d", i, {carry, s}, want);
      end
      checks++;
      if (s[0] != ~(^i)) begin
        failures++;
        if (failures < 10) $display("FAIL parity i=%015b s0=%0b", i, s[0]);
      end
      if (carry) n_carry_out++;
      if (a >= 4) n_sum_w4++;
      if (b >= 4) n_carry_w4++;
      if (!s[0]) n_odd++;
      if (int'({carry, s}) == $countones(i)) n_exact++;
    end
    // the all-ones input overflows the 4-bit sum
    i = '1;
    #1;
    checks++;
    if ({carry, s} != 5'b10000) begin
      failures++;
      $display("FAIL all ones -> carry=%0b s=%04b", carry, s);
    end
    $display("carry out: %0d, sum-side weight-4: %0d, carry-side weight-4: %0d, odd inputs: %0d",
             n_carry_out, n_sum_w4, n_carry_w4, n_odd);
    $display("outputs equal to the true count of ones: %0d of %0d", n_exact, 1 << 15);
    checks += 4;
    if (n_carry_out == 0) begin failures++; $display("FAIL no carry out seen"); end
    if (n_sum_w4 == 0)    begin failures++; $display("FAIL sum-side weight-4 never seen"); end
    if (n_carry_w4 == 0)  begin failures++; $display("FAIL carry-side weight-4 never seen"); end
    if (n_odd == 0)       begin failures++; $display("FAIL odd input count never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_compressor_5_3: exhaustive self-check of compressor_5_3.
// All 32 input patterns are applied. The expected outputs are worked out from
// the specified behaviour rather than from the gates: o0 is the parity of the
// number of ones; the internal term is the majority of x0..x2 (two or more of
// them set); o1/o2 are the sum/carry of adding that majority and x4. A few
// hand-worked vectors are checked as well. The number of patterns on which
// {o2,o1,o0} equals the true count of ones is reported for information.
module tb_compressor_5_3;
  logic [4:0] x;
  logic o0, o1, o2;
  int checks = 0, failures = 0, exact = 0;

  compressor_5_3 dut (.x(x), .o0(o0), .o1(o1), .o2(o2));

  function automatic logic [2:0] expected(input logic [4:0] v);
    int ones, maj3, hsum;
    ones = $countones(v);
    maj3 = (int'(v[0]) + int'(v[1]) + int'(v[2]) >= 2) ? 1 : 0;
    hsum = maj3 + int'(v[4]);             // 0..2
    return {hsum >= 2, hsum == 1, ones % 2 == 1};
  endfunction

  task automatic check(input logic [4:0] v, input logic [2:0] want);
    x = v;
    #1;
    checks++;
    if ({o2, o1, o0} !== want) begin
      failures++;
      $display("FAIL x=%05b -> o=%03b, expected %03b", v, {o2, o1, o0}, want);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      check(5'(v), expected(5'(v)));
      if (int'({o2, o1, o0}) == $countones(5'(v))) exact++;
    end
    // Hand-worked vectors: {x4..x0} -> {o2,o1,o0}
    check(5'b00000, 3'b000);
    check(5'b11111, 3'b101);   // majority 1, x4 1 -> o2
    check(5'b11000, 3'b010);   // x3,x4: parity 0, x4 alone -> o1
    check(5'b00011, 3'b010);   // x0,x1 agree at 1 -> majority 1
    check(5'b00101, 3'b010);   // x0,x2: x0^x1=1 selects x2 = 1
    check(5'b01001, 3'b000);   // x0,x3: majority 0, x4 0
    check(5'b10110, 3'b101);   // x1,x2,x4: parity 1, majority 1 & x4
    $display("patterns equal to the true count of ones: %0d of 32", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_full_adder: exhaustive self-check of full_adder.
// All eight input patterns are applied; {carry, sum} must equal the integer
// sum a + b + c. A time-based watchdog ends the run if it hangs.
module tb_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      checks++;
      if (int'({carry, sum}) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

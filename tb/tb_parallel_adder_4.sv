// tb_parallel_adder_4: self-check of parallel_adder_4.
// The default 4-bit adder is checked exhaustively (all a, b and cin), and an
// 8-bit instance with random operands checks that the width parameter takes
// effect. Expected values come from integer addition.
module tb_parallel_adder_4;
  logic [3:0] a4, b4, s4;
  logic       cin4, carry4;
  logic [7:0] a8, b8, s8;
  logic       cin8, carry8;
  int checks = 0, failures = 0, carries_out = 0;

  parallel_adder_4 dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .carry(carry4));
  parallel_adder_4 #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .carry(carry8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin4, b4, a4} = 9'(v);
      #1;
      checks++;
      if (int'({carry4, s4}) != int'(a4) + int'(b4) + int'(cin4)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> carry=%0b s=%0d", a4, b4, cin4, carry4, s4);
      end
      if (carry4) carries_out++;
    end
    for (int n = 0; n < 500; n++) begin
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      cin8 = 1'($urandom);
      #1;
      checks++;
      if (int'({carry8, s8}) != int'(a8) + int'(b8) + int'(cin8)) begin
        failures++;
        $display("FAIL(8) a=%0d b=%0d cin=%0d -> carry=%0b s=%0d", a8, b8, cin8, carry8, s8);
      end
    end
    checks++;
    if (carries_out == 0) begin
      failures++;
      $display("FAIL carry-out never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_half_adder: exhaustive self-checking test of half_adder.
// All four input pairs are applied; s and co are compared with the low and
// high bit of the integer sum a + b.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int unsigned exp_sum;
      {a, b} = 2'(i);
      #1;
      exp_sum = int'(a) + int'(b);
      checks++;
      if ({co, s} !== 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%0d b=%0d got co,s=%b%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

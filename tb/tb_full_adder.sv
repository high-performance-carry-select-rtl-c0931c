// tb_full_adder: exhaustive self-checking test of full_adder.
// All eight input combinations are applied. {co, s} is compared with the
// integer sum a + b + ci, p with a ^ b and g with a & b.
module tb_full_adder;
  logic a, b, ci, s, co, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int unsigned exp_sum;
      {a, b, ci} = 3'(i);
      #1;
      exp_sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(exp_sum)) begin
        failures++;
        $display("FAIL sum a=%0d b=%0d ci=%0d got co,s=%b%b", a, b, ci, co, s);
      end
      checks++;
      if (p !== (a != b) || g !== (a && b)) begin
        failures++;
        $display("FAIL p/g a=%0d b=%0d got p=%b g=%b", a, b, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mux2: exhaustive self-checking test of mux2.
// Every combination of sel, d0 and d1 is applied and y compared with the
// input that sel names.
module tb_mux2;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic expected;
      {sel, d0, d1} = 3'(i);
      #1;
      if (sel) expected = d1;
      else     expected = d0;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL sel=%0d d0=%0d d1=%0d got y=%b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

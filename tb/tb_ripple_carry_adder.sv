// tb_ripple_carry_adder: self-checking test of ripple_carry_adder.
// The default 4-bit adder is tested exhaustively and an 11-bit one (the
// widest block of the default adder) with random operands. Sum, the carry
// out of every bit, propagate and generate are each compared with values
// computed from integer arithmetic on the operand slices.
module tb_ripple_carry_adder;
  localparam int unsigned WB = 11;

  logic [3:0]    a4, b4, s4, c4, p4, g4;
  logic [WB-1:0] aw, bw, sw, cw, pw, gw;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .s(s4), .c(c4), .p(p4), .g(g4));
  ripple_carry_adder #(.W(WB)) dutw (.a(aw), .b(bw), .s(sw), .c(cw), .p(pw), .g(gw));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected carry out of bit i: bit i+1 of the sum of the slices 0..i
  function automatic logic [31:0] ref_carries(int unsigned w, logic [31:0] x, logic [31:0] y);
    logic [31:0] r = '0;
    for (int unsigned i = 0; i < w; i++) begin
      longint unsigned m = (64'd1 << (i + 1)) - 1;
      longint unsigned t = (longint'(x) & m) + (longint'(y) & m);
      r[i] = t[i+1];
    end
    return r;
  endfunction

  task automatic check4();
    logic [4:0] exp_s;
    logic [31:0] exp_c;
    exp_s = {1'b0, a4} + {1'b0, b4};
    exp_c = ref_carries(4, 32'(a4), 32'(b4));
    checks++;
    if (s4 !== exp_s[3:0] || c4 !== exp_c[3:0] || p4 !== (a4 ^ b4) || g4 !== (a4 & b4)) begin
      failures++;
      $display("FAIL W=4 a=%h b=%h s=%h c=%b p=%b g=%b", a4, b4, s4, c4, p4, g4);
    end
  endtask

  task automatic checkw();
    logic [WB:0] exp_s;
    logic [31:0] exp_c;
    exp_s = {1'b0, aw} + {1'b0, bw};
    exp_c = ref_carries(WB, 32'(aw), 32'(bw));
    checks++;
    if (sw !== exp_s[WB-1:0] || cw !== exp_c[WB-1:0] || pw !== (aw ^ bw) || gw !== (aw & bw)) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h s=%h c=%b", WB, aw, bw, sw, cw);
    end
  endtask

  initial begin
    aw = '0; bw = '0;
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1 check4();
    end
    for (int i = 0; i < 5000; i++) begin
      aw = WB'($urandom);
      bw = (i % 4 == 0) ? ~aw : WB'($urandom);   // long propagate runs too
      if (i % 8 == 1) bw = ~aw + WB'(1);
      #1 checkw();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

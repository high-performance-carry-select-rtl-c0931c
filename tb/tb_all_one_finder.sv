// tb_all_one_finder: exhaustive self-checking test of all_one_finder at the
// default width 4 and at 11 bits. For every input pattern the expected P_k is
// 0 exactly when the gate bits 0..k-1 are all 1 (the gate bits being the low
// sum bits and, on top, e_msb), computed here by masking.
module tb_all_one_finder;
  localparam int unsigned WB = 11;

  logic [2:0]    s4;
  logic          e4;
  logic [3:0]    p4;
  logic [WB-2:0] sw;
  logic          ew;
  logic [WB-1:0] pw;
  int checks = 0, failures = 0;

  all_one_finder dut4 (.s0(s4), .e_msb(e4), .p(p4));
  all_one_finder #(.W(WB)) dutw (.s0(sw), .e_msb(ew), .p(pw));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_p(int unsigned w, logic [31:0] gates);
    logic [31:0] r = '0;
    for (int unsigned k = 1; k <= w; k++) begin
      logic [31:0] m = (32'd1 << k) - 1;
      r[k-1] = ((gates & m) != m);
    end
    return r;
  endfunction

  initial begin
    logic [31:0] exp_p;
    int unsigned zeros4 = 0, zerosw = 0;
    sw = '0; ew = 1'b0;
    for (int i = 0; i < 16; i++) begin
      {e4, s4} = 4'(i);
      #1;
      exp_p = ref_p(4, 32'({e4, s4}));
      checks++;
      if (p4 !== exp_p[3:0]) begin
        failures++;
        $display("FAIL W=4 s0=%b e=%b got p=%b exp %b", s4, e4, p4, exp_p[3:0]);
      end
      if (p4[3] == 1'b0) zeros4++;
    end
    for (int i = 0; i < (1 << WB); i++) begin
      {ew, sw} = WB'(i);
      #1;
      exp_p = ref_p(WB, 32'({ew, sw}));
      checks++;
      if (pw !== exp_p[WB-1:0]) begin
        failures++;
        $display("FAIL W=%0d s0=%b e=%b got p=%b", WB, sw, ew, pw);
      end
      if (pw[WB-1] == 1'b0) zerosw++;
    end
    // exactly one pattern per width has every gate on
    checks++;
    if (zeros4 != 1 || zerosw != 1) begin
      failures++;
      $display("FAIL all-one pattern count %0d %0d", zeros4, zerosw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

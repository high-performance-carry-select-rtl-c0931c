// tb_addone_csa_block: self-checking test of addone_csa_block.
// The default 4-bit block is tested exhaustively over a, b and cin, a 2-bit
// block likewise, and an 11-bit block (the widest of the default adder) with
// random and directed operands. {cout, s} is compared with the integer sum
// a + b + cin. The test counts the carry-out cases the block distinguishes for
// cin = 1 (carry into the top bit, top-bit generate, all sum bits one, none)
// and fails if any of them never occurred.
module tb_addone_csa_block;
  localparam int unsigned WB = 11;

  logic [3:0]    a4, b4, s4;
  logic          ci4, co4;
  logic [1:0]    a2, b2, s2;
  logic          ci2, co2;
  logic [WB-1:0] aw, bw, sw;
  logic          ciw, cow;
  int checks = 0, failures = 0;
  int n_cin0 = 0, n_ctop = 0, n_gtop = 0, n_allone = 0, n_none = 0;

  addone_csa_block dut4 (.a(a4), .b(b4), .cin(ci4), .s(s4), .cout(co4));
  addone_csa_block #(.W(2))  dut2 (.a(a2), .b(b2), .cin(ci2), .s(s2), .cout(co2));
  addone_csa_block #(.W(WB)) dutw (.a(aw), .b(bw), .cin(ciw), .s(sw), .cout(cow));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // classify the case the block's carry-out logic is in (W-bit operands)
  task automatic classify(int unsigned w, logic [31:0] x, logic [31:0] y, logic c);
    logic [31:0] m_low  = (32'd1 << (w - 1)) - 1;
    logic [31:0] m_all  = (32'd1 << w) - 1;
    logic [32:0] low    = 33'(x & m_low) + 33'(y & m_low);
    logic [32:0] s_zero = 33'(x & m_all) + 33'(y & m_all);
    if (!c)                             n_cin0++;
    else if (low[w-1])                  n_ctop++;
    else if (x[w-1] && y[w-1])          n_gtop++;
    else if ((32'(s_zero) & m_all) == m_all) n_allone++;
    else                                n_none++;
  endtask

  initial begin
    aw = '0; bw = '0; ciw = 1'b0; a2 = '0; b2 = '0; ci2 = 1'b0;
    // 4-bit block, exhaustive
    for (int i = 0; i < 512; i++) begin
      logic [4:0] exp_r;
      {ci4, a4, b4} = 9'(i);
      #1;
      exp_r = 5'(a4) + 5'(b4) + 5'(ci4);
      classify(4, 32'(a4), 32'(b4), ci4);
      checks++;
      if ({co4, s4} !== exp_r) begin
        failures++;
        $display("FAIL W=4 a=%h b=%h cin=%b got %b exp %b", a4, b4, ci4, {co4, s4}, exp_r);
      end
    end
    // 2-bit block, exhaustive
    for (int i = 0; i < 32; i++) begin
      logic [2:0] exp_r;
      {ci2, a2, b2} = 5'(i);
      #1;
      exp_r = 3'(a2) + 3'(b2) + 3'(ci2);
      checks++;
      if ({co2, s2} !== exp_r) begin
        failures++;
        $display("FAIL W=2 a=%h b=%h cin=%b got %b", a2, b2, ci2, {co2, s2});
      end
    end
    // 11-bit block, random with propagate-heavy operands
    for (int i = 0; i < 20000; i++) begin
      logic [WB:0] exp_r;
      aw  = WB'($urandom);
      ciw = 1'($urandom);
      case (i % 4)
        0: bw = ~aw;                                   // all propagate
        1: bw = ~aw ^ WB'(1 << ($urandom % WB));       // one bit off
        default: bw = WB'($urandom);
      endcase
      #1;
      exp_r = (WB+1)'(aw) + (WB+1)'(bw) + (WB+1)'(ciw);
      classify(WB, 32'(aw), 32'(bw), ciw);
      checks++;
      if ({cow, sw} !== exp_r) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h cin=%b got %b exp %b", WB, aw, bw, ciw, {cow, sw}, exp_r);
      end
    end
    $display("cases: cin0=%0d carry_into_top=%0d top_generate=%0d all_one=%0d none=%0d",
             n_cin0, n_ctop, n_gtop, n_allone, n_none);
    checks++;
    if (n_cin0 == 0 || n_ctop == 0 || n_gtop == 0 || n_allone == 0 || n_none == 0) begin
      failures++;
      $display("FAIL a carry-out case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_carry_select_adder: end-to-end self-checking test of the 64-bit
// carry-select adder at its default configuration (9 blocks of
// 4,4,5,6,7,8,9,10,11 bits).
//
// Operands are built block by block: each block slice of b is either random,
// the complement of a (every bit propagates, so S0 of the block is all ones),
// the complement with one bit changed, or all ones in both operands. The
// result is compared with 65-bit integer addition. For every add-one block
// (blocks 2 to 9) the test counts, from the operands alone, which case of the
// block's selection logic each addition exercised:
//   cin0     carry into the block is 0, S0 and the RCA carry pass through
//   addone   carry in is 1 and S0 + 1 stops inside the block
//   allone   carry in is 1 and S0 is all ones: the carry passes through the
//            block by way of the all-one finding chain
//   ctop     carry in is 1 and the RCA already carries into the top bit
//   gtop     carry in is 1 and the top bit generates
// and fails if any case never occurred in any block. It also counts additions
// in which the carry of block 1 ripples through all eight add-one blocks.
module tb_carry_select_adder;
  import csa_pkg::*;

  localparam int unsigned N = CSA_WIDTH;
  localparam int unsigned NB = CSA_BLOCKS;
  localparam int NUM_RANDOM = 200000;

  logic [N-1:0] a, b, sum;
  logic         cout;
  int checks = 0, failures = 0;
  int n_cin0 [NB], n_addone [NB], n_allone [NB], n_ctop [NB], n_gtop [NB];
  int n_full_chain = 0;
  int unsigned lsb [NB];

  carry_select_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] mask(int unsigned w);
    return (w >= N) ? '1 : ((N'(1) << w) - N'(1));
  endfunction

  task automatic check_one();
    logic [N:0] exp_r;
    int unsigned chain = 0;
    #1;
    exp_r = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cout, sum} !== exp_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h got %h_%h exp %h", a, b, cout, sum, exp_r);
    end
    for (int unsigned i = 1; i < NB; i++) begin
      int unsigned w = CSA_BLOCK_W[i];
      logic [N:0] low, blk, top_low;
      logic [N-1:0] ai, bi;
      low = {1'b0, a & mask(lsb[i])} + {1'b0, b & mask(lsb[i])};
      ai  = (a >> lsb[i]) & mask(w);
      bi  = (b >> lsb[i]) & mask(w);
      blk = {1'b0, ai} + {1'b0, bi};
      top_low = {1'b0, ai & mask(w - 1)} + {1'b0, bi & mask(w - 1)};
      if (!low[lsb[i]])                    n_cin0[i]++;
      else if (top_low[w-1])               n_ctop[i]++;
      else if (ai[w-1] && bi[w-1])         n_gtop[i]++;
      else if ((blk & {1'b0, mask(w)}) == {1'b0, mask(w)}) begin
        n_allone[i]++;
        chain++;
      end else                             n_addone[i]++;
    end
    if (chain == NB - 1 && exp_r[lsb[1]] == 1'b0) n_full_chain++;
  endtask

  initial begin
    automatic int unsigned acc = 0;
    for (int i = 0; i < NB; i++) begin
      lsb[i] = acc;
      acc += CSA_BLOCK_W[i];
      n_cin0[i] = 0; n_addone[i] = 0; n_allone[i] = 0; n_ctop[i] = 0; n_gtop[i] = 0;
    end

    // directed: corners and a carry rippling through every block
    a = '0;        b = '0;        check_one();
    a = '1;        b = N'(1);     check_one();
    a = '1;        b = '1;        check_one();
    a = '1;        b = '0;        check_one();
    a = {1'b0, {(N-1){1'b1}}}; b = N'(1); check_one();

    for (int t = 0; t < NUM_RANDOM; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      for (int i = 0; i < NB; i++) begin
        automatic logic [N-1:0] m = mask(CSA_BLOCK_W[i]) << lsb[i];
        case ($urandom % 5)
          0: b = (b & ~m) | (~a & m);
          1: b = (b & ~m) | ((~a ^ (N'(1) << (lsb[i] + ($urandom % CSA_BLOCK_W[i])))) & m);
          2: begin a = a | m; b = b | m; end
          default: ;
        endcase
      end
      // now and then make the low block generate a carry into the chain
      if (t % 7 == 0) begin
        a = a | mask(lsb[1]);
        b[0] = 1'b1;
        for (int i = 1; i < NB; i++) begin
          automatic logic [N-1:0] m = mask(CSA_BLOCK_W[i]) << lsb[i];
          b = (b & ~m) | (~a & m);
        end
      end
      check_one();
    end

    for (int i = 1; i < NB; i++) begin
      $display("block %0d (%0d bits): cin0=%0d addone=%0d allone=%0d ctop=%0d gtop=%0d",
               i + 1, CSA_BLOCK_W[i], n_cin0[i], n_addone[i], n_allone[i], n_ctop[i], n_gtop[i]);
      checks++;
      if (n_cin0[i] == 0 || n_addone[i] == 0 || n_allone[i] == 0 ||
          n_ctop[i] == 0 || n_gtop[i] == 0) begin
        failures++;
        $display("FAIL block %0d: a selection case never occurred", i + 1);
      end
    end
    $display("carry from block 1 through all add-one blocks: %0d times", n_full_chain);
    checks++;
    if (n_full_chain == 0) begin
      failures++;
      $display("FAIL full carry chain never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

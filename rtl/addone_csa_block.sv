// addone_csa_block: one W-bit block of the carry-select adder, built from a
// single ripple-carry adder and an add-one circuit.
//
// The RCA computes S0 = a + b with a carry in of 0. The result for a carry in
// of 1 is S0 + 1, which is S0 with every bit up to and including its lowest 0
// inverted. The all-one finding chain (all_one_finder) gives P_k = 0 when the
// bits of S0 below k are all 1, so each sum bit is chosen between S0_k and
// ~S0_k by a 2:1 multiplexer:
//
//   S_0 = cin    ? ~S0_0 : S0_0
//   S_k = Sel_k  ? ~S0_k : S0_k,   Sel_k = cin & ~P_k      (k = 1 .. W-1)
//
// The block carry out is cout = cin ? cout1 : C_{W-1}, where C_i is the RCA
// carry out of bit i and cout1 the carry out for a carry in of 1:
//
//   cout1 = C_{W-2} ? (a_{W-1} | b_{W-1}) : ~(P_W & ~(a_{W-1} & b_{W-1}))
//
// If the carry into the top bit is 1 the block already carries for a carry
// in of 0, and cout1 is the top bit's own carry, a | b. Otherwise the block
// carries for a carry in of 1 when all W sum bits of S0 are 1 (P_W = 0) or the
// top bit generates. P_W is formed from a_{W-1} ^ b_{W-1} rather than from the
// top sum bit, so the carry-in-to-carry-out path of the block is just the
// final multiplexer. This structure follows the design's 4-bit block; the
// generalisation to W bits (the top bit's signals are those of bit W-1, the
// C2 select becomes C_{W-2}) is this implementation's reading of it.
//
// Interface: a, b and cin in, s and cout out; purely combinational. W >= 2.
module addone_csa_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  if (W < 2) begin : g_bad_width
    $error("addone_csa_block: W must be at least 2");
  end

  logic [W-1:0] s0;      // RCA sum for a carry in of 0
  logic [W-1:0] c;       // RCA carry out of each bit
  logic [W-1:0] prop;    // a ^ b per bit
  logic [W-1:0] gen;     // a & b per bit
  logic [W-1:0] pchain;  // pchain[k-1] = P_k
  logic [W-1:0] s0_n;    // inverted S0
  logic [W-1:0] sel;     // sum select, sel[k] = Sel_k
  logic         c_top_n; // ~(P_W & ~g_{W-1}): carry for cin = 1 when C_{W-2} = 0
  logic         c_top_p; // a_{W-1} | b_{W-1}: carry for cin = 1 when C_{W-2} = 1
  logic         cout1;   // carry out for cin = 1

  ripple_carry_adder #(.W(W)) u_rca (
    .a (a),
    .b (b),
    .s (s0),
    .c (c),
    .p (prop),
    .g (gen)
  );

  all_one_finder #(.W(W)) u_aof (
    .s0    (s0[W-2:0]),
    .e_msb (prop[W-1]),
    .p     (pchain)
  );

  always_comb begin
    s0_n   = ~s0;
    sel[0] = cin;
    for (int k = 1; k < W; k++) begin
      sel[k] = cin & ~pchain[k-1];
    end
    c_top_n = ~(pchain[W-1] & ~gen[W-1]);
    c_top_p = gen[W-1] | prop[W-1];
  end

  for (genvar k = 0; k < W; k++) begin : g_sum_mux
    mux2 u_mux (
      .sel (sel[k]),
      .d0  (s0[k]),
      .d1  (s0_n[k]),
      .y   (s[k])
    );
  end

  mux2 u_mux_c1 (
    .sel (c[W-2]),
    .d0  (c_top_n),
    .d1  (c_top_p),
    .y   (cout1)
  );

  // The carry-out selection relies on this: a carry into the top bit means
  // some lower bit generates, so the low W-1 sum bits cannot all be 1 and
  // P_W must be 1.
  always_comb begin
    if (c[W-2]) begin
      assert (pchain[W-1])
        else $error("addone_csa_block: carry into top bit with all-one S0");
    end
  end

  mux2 u_mux_cout (
    .sel (cin),
    .d0  (c[W-1]),
    .d1  (cout1),
    .y   (cout)
  );

endmodule

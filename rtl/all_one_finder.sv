// all_one_finder: the fast all-one finding chain of an add-one block.
//
// In the circuit this is a chain of series nMOS pass transistors from ground,
// one per bit, each gated by a sum bit of the block's RCA, with a pull-up on
// every node between them. Node P_k is pulled to 0 only when the transistors
// of bits 0..k-1 all conduct, so
//
//   P_k = ~(s0[0] & s0[1] & ... & s0[k-1])        for k = 1 .. W-1
//   P_W = ~(s0[0] & ... & s0[W-2] & e_msb)
//
// P_k = 0 means that adding one to S0 flips bit k (all bits below it are 1).
// Only the low W-1 sum bits enter; the last stage is gated by e_msb = a[W-1] ^ b[W-1] instead of the top sum
// bit: when bits 0..W-2 of S0 are all 1 every lower bit propagates, the carry
// into the top bit is 0 and its sum equals e_msb, so P_W still means "all W
// sum bits are 1", but it need not wait for the top carry.
//
// RTL models each stage as node[k] = ~gate[k-1] | node[k-1], node[0] = 0
// (the ground end). The buffers the circuit inserts along a long chain have
// no logic function and are left out. p[k-1] carries P_k, so p[0] is P_1 and
// p[W-1] is P_W. Purely combinational.
module all_one_finder #(
  parameter int unsigned W = 4
) (
  input  logic [W-2:0] s0,
  input  logic         e_msb,
  output logic [W-1:0] p
);

  if (W < 2) begin : g_bad_width
    $error("all_one_finder: W must be at least 2");
  end

  logic [W-1:0] gate_bit;

  always_comb begin
    logic node;
    gate_bit = {e_msb, s0};
    node     = 1'b0;            // ground end of the chain
    for (int k = 0; k < W; k++) begin
      node = ~gate_bit[k] | node;
      p[k] = node;
    end
  end

endmodule

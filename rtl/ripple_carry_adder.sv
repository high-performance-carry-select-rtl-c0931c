// ripple_carry_adder: W-bit ripple-carry adder with a carry in of 0.
//
// A half adder at bit 0 and W-1 full adders above it, the carry rippling from
// bit to bit. This computes the Cin = 0 sum S0 of an add-one block, and on its
// own it is block 1 of the adder, which has no carry in.
//
// Outputs: s is the sum, c[i] the carry out of bit i (c[W-1] is the carry out
// of the whole adder), p[i] = a[i] ^ b[i] and g[i] = a[i] & b[i]. The add-one
// block uses c[W-2], c[W-1], p[W-1] and g[W-1]. Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic [W-1:0] c,
  output logic [W-1:0] p,
  output logic [W-1:0] g
);

  if (W < 1) begin : g_bad_width
    $error("ripple_carry_adder: W must be at least 1");
  end

  half_adder u_ha (
    .a  (a[0]),
    .b  (b[0]),
    .s  (s[0]),
    .co (c[0])
  );

  always_comb begin
    p[0] = a[0] ^ b[0];
    g[0] = a[0] & b[0];
  end

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i-1]),
      .s  (s[i]),
      .co (c[i]),
      .p  (p[i]),
      .g  (g[i])
    );
  end

endmodule

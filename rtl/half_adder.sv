// half_adder: one-bit half adder.
//
// Sits at bit 0 of every ripple-carry adder of the design, since each RCA
// computes its sum with a carry in of 0. s = a ^ b, co = a & b. The sum is also
// the propagate signal of the bit, and the carry is its generate signal.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b;
    co = a & b;
  end

endmodule

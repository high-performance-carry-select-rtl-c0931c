// full_adder: one-bit full adder as used in the ripple-carry chain.
//
// The sum takes two levels of two-input XOR, (a ^ b) ^ ci. The carry is a
// two-level NAND-NAND network, co = ~(~(a & b) & ~((a ^ b) & ci)), so that it
// is one gate pair per bit along the chain. The gate structure follows the
// design's description of its FA cell.
//
// Besides s and co the cell brings out its first XOR, p = a ^ b, and its
// generate, g = a & b. In the most significant bit of an add-one block these
// feed the all-one finding chain and the carry-out logic, so no extra gates
// are needed to obtain them. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p,
  output logic g
);

  logic nand_ab;
  logic nand_pc;

  always_comb begin
    p       = a ^ b;
    g       = a & b;
    s       = p ^ ci;
    nand_ab = ~(a & b);
    nand_pc = ~(p & ci);
    co      = ~(nand_ab & nand_pc);
  end

endmodule

// mux2: two-input multiplexer, y = sel ? d1 : d0.
//
// In the design this is the low-delay transmission-gate multiplexer: two
// complementary pass gates driven by sel and its inverse, so that the path
// from a data input to y is a single pass gate. In RTL only its logic function
// remains. Every sum bit and every block carry of the adder is selected by one
// of these. Purely combinational.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule

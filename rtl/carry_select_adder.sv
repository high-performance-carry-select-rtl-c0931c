// carry_select_adder: WIDTH-bit carry-select adder (64 bits by default).
//
// The operand is split into NUM_BLOCKS blocks of BLOCK_W[i] bits, least
// significant first; by default 9 blocks of 4, 4, 5, 6, 7, 8, 9, 10 and 11
// bits. Block 1 is a plain ripple-carry adder with no carry in. Each further
// block is an addone_csa_block: it adds its operand slices with one RCA
// assuming a carry in of 0, and as soon as the carry of the block below
// arrives it selects, bit by bit, between that sum and its add-one version,
// and selects its own carry out. All blocks compute their RCA sums in
// parallel; only the block carries form a chain, one multiplexer per block.
// The block lengths grow towards the top so that each block's RCA finishes
// about when the carry from below reaches it.
//
// Interface: sum = a + b (low WIDTH bits), cout the carry out of the top
// block. The adder has no carry in: bit 0 is a half adder. Purely
// combinational, no clock or reset. WIDTH must equal the sum of BLOCK_W; the
// block lengths are the design's main configuration. Block 1 leaves the
// RCA's propagate and generate outputs unconnected in effect (lint reports
// them unused); only the add-one blocks need them.
module carry_select_adder
  import csa_pkg::*;
#(
  parameter int unsigned WIDTH      = CSA_WIDTH,
  parameter int unsigned NUM_BLOCKS = CSA_BLOCKS,
  parameter int unsigned BLOCK_W [NUM_BLOCKS] = CSA_BLOCK_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // bit position of the lowest bit of block i
  function automatic int unsigned block_lsb(int unsigned i);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < i; j++) acc += BLOCK_W[j];
    return acc;
  endfunction

  if (block_lsb(NUM_BLOCKS) != WIDTH) begin : g_bad_config
    $error("carry_select_adder: BLOCK_W must add up to WIDTH");
  end

  // bc[i] is the carry out of block i
  logic [NUM_BLOCKS-1:0] bc;

  for (genvar i = 0; i < NUM_BLOCKS; i++) begin : g_blk
    localparam int unsigned LSB = block_lsb(i);
    localparam int unsigned BW  = BLOCK_W[i];

    if (i == 0) begin : g_rca
      logic [BW-1:0] c, p, g;
      ripple_carry_adder #(.W(BW)) u_rca (
        .a (a[LSB +: BW]),
        .b (b[LSB +: BW]),
        .s (sum[LSB +: BW]),
        .c (c),
        .p (p),
        .g (g)
      );
      assign bc[i] = c[BW-1];
    end else begin : g_addone
      addone_csa_block #(.W(BW)) u_blk (
        .a    (a[LSB +: BW]),
        .b    (b[LSB +: BW]),
        .cin  (bc[i-1]),
        .s    (sum[LSB +: BW]),
        .cout (bc[i])
      );
    end
  end

  assign cout = bc[NUM_BLOCKS-1];

endmodule

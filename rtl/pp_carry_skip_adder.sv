// pp_carry_skip_adder: a parity preserving reversible carry skip adder made
// of BLOCKS 4-bit pp_csa_block blocks in a chain.
//
// Block k adds bits 4k..4k+3; its carry-out is the carry-in of block k+1 and
// the carry-out of the last block is Cout. Inside each block a carry whose
// block propagate PB is 1 bypasses the four full adders. The skip output
// gives each block's PB, which is also its garbage line sel_p.
// Splitting a carry skip adder into m-bit blocks is the general scheme;
// the 4-bit block is the published one, chaining BLOCKS of them and the
// default of 2 blocks are this design's choices.
// Purely combinational.
module pp_carry_skip_adder
  import pp_pkg::*;
#(
  parameter int unsigned BLOCKS = 2
) (
  input  logic [BLOCKS*CSA_BLOCK_BITS-1:0] a,
  input  logic [BLOCKS*CSA_BLOCK_BITS-1:0] b,
  input  logic                             cin,
  output logic [BLOCKS*CSA_BLOCK_BITS-1:0] sum,
  output logic                             cout,
  output logic [BLOCKS-1:0]                skip,    // block propagate PB
  output csa_garbage_t [BLOCKS-1:0]        garbage
);

  logic [BLOCKS:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_block
    pp_csa_block u_blk (
      .a(a[k*CSA_BLOCK_BITS +: CSA_BLOCK_BITS]),
      .b(b[k*CSA_BLOCK_BITS +: CSA_BLOCK_BITS]),
      .cin(carry[k]),
      .sum(sum[k*CSA_BLOCK_BITS +: CSA_BLOCK_BITS]),
      .cout(carry[k+1]),
      .garbage(garbage[k])
    );
    assign skip[k] = garbage[k].sel_p;
  end

  assign cout = carry[BLOCKS];

endmodule

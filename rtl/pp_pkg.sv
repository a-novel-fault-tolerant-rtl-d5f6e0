// pp_pkg: shared sizes and line bundles for the parity preserving reversible
// adders.
//
// A reversible circuit has as many output lines as input lines. Lines that
// carry no wanted result are "garbage"; they are still brought out here,
// because the single error check works on the parity of every output line.
// The sizes below follow the gate-level structures of the full adder
// (two NMG and two F2G gates, 8 lines) and of the 4-bit carry skip block
// (one F2G, four full adders and four Fredkin gates, 34 lines).
package pp_pkg;

  // Bits per carry skip block (the block is drawn for 4 bits).
  localparam int unsigned CSA_BLOCK_BITS = 4;

  // Garbage lines of one full adder besides its propagate output P.
  // Together with sum, carry out and P this gives the 8 lines of the adder.
  localparam int unsigned FA_GARBAGE = 5;

  // Garbage lines of one 4-bit carry skip block:
  // 1 (F2G) + 4 x 5 (full adders) + 4 x 2 (Fredkin gates) = 29.
  localparam int unsigned CSA_GARBAGE = 1 + CSA_BLOCK_BITS * FA_GARBAGE + 8;

  // The garbage lines of one full adder, named after the value they carry.
  typedef struct packed {
    logic ab_r;     // NMG #1 output R = A&B (its S copy feeds NMG #2)
    logic a_p;      // F2G #1 output P = A
    logic a_r;      // F2G #1 output R = A
    logic pc_r;     // NMG #2 output R = (A^B)&Cin
    logic p_r;      // F2G #2 output R = A^B
  } fa_garbage_t;

  // The garbage lines of one 4-bit carry skip block as a flat vector, and
  // the same lines named after the value they carry.
  typedef logic [CSA_GARBAGE-1:0] csa_lines_t;

  typedef struct packed {
    logic                                  cin_p;   // F2G output P = Cin
    fa_garbage_t [CSA_BLOCK_BITS-1:0]      fa;      // full adder garbage
    logic                                  hi_p;    // FRG (P3,0,P2): P = P3
    logic                                  hi_r;    //   R = ~P3 & P2
    logic                                  lo_p;    // FRG (P1,0,P0): P = P1
    logic                                  lo_r;    //   R = ~P1 & P0
    logic                                  mid_p;   // FRG (P3P2,0,P1P0): P = P3P2
    logic                                  mid_r;   //   R = ~P3P2 & P1P0
    logic                                  sel_p;   // FRG (PB,C3,Cin): P = PB
    logic                                  sel_r;   //   R = PB ? C3 : Cin
  } csa_garbage_t;

endpackage

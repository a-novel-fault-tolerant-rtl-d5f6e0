// pp_adders_top: the parity preserving reversible circuits side by side.
//
//   - tg_*  : the parity preserving Toffoli gate (one NMG with D = 0)
//   - rca_* : a RCA_WIDTH-bit ripple carry adder of NMG/F2G full adders
//   - csa_* : a carry skip adder of CSA_BLOCKS 4-bit skip blocks
//
// The three circuits share no signals. Each one's full set of output lines,
// garbage included, goes to its own parity_checker together with its data
// inputs; the *_parity_err output is 1 when the two parities differ, which
// is how a single faulty line shows itself. In a fault free circuit these
// outputs stay 0. Garbage lines are not brought out otherwise; csa_skip
// shows, for each skip block, whether its carry bypassed the block.
// The circuits follow the published structures; putting a checker on each
// and the default sizes are this design's choices. Purely combinational.
module pp_adders_top
  import pp_pkg::*;
#(
  parameter int unsigned RCA_WIDTH  = 4,
  parameter int unsigned CSA_BLOCKS = 2,
  localparam int unsigned CSA_WIDTH = CSA_BLOCKS * CSA_BLOCK_BITS
) (
  // parity preserving Toffoli gate
  input  logic                 tg_a,
  input  logic                 tg_b,
  input  logic                 tg_c,
  output logic                 tg_p,          // A
  output logic                 tg_q,          // B
  output logic                 tg_t,          // (A & B) ^ C
  output logic                 tg_parity_err,
  // ripple carry adder
  input  logic [RCA_WIDTH-1:0] rca_a,
  input  logic [RCA_WIDTH-1:0] rca_b,
  input  logic                 rca_cin,
  output logic [RCA_WIDTH-1:0] rca_sum,
  output logic                 rca_cout,
  output logic [RCA_WIDTH-1:0] rca_prop,
  output logic                 rca_parity_err,
  // carry skip adder
  input  logic [CSA_WIDTH-1:0] csa_a,
  input  logic [CSA_WIDTH-1:0] csa_b,
  input  logic                 csa_cin,
  output logic [CSA_WIDTH-1:0] csa_sum,
  output logic                 csa_cout,
  output logic [CSA_BLOCKS-1:0] csa_skip,
  output logic                 csa_parity_err
);

  // ---------------- Toffoli gate ----------------
  logic tg_garbage;

  pp_toffoli u_tg (
    .a(tg_a), .b(tg_b), .c(tg_c),
    .p(tg_p), .q(tg_q), .garbage(tg_garbage), .t(tg_t)
  );

  parity_checker #(.IN_W(3), .OUT_W(4)) u_tg_chk (
    .in_lines ({tg_a, tg_b, tg_c}),
    .out_lines({tg_p, tg_q, tg_garbage, tg_t}),
    .error    (tg_parity_err)
  );

  // ---------------- ripple carry adder ----------------
  fa_garbage_t [RCA_WIDTH-1:0] rca_garbage;

  pp_ripple_carry_adder #(.WIDTH(RCA_WIDTH)) u_rca (
    .a(rca_a), .b(rca_b), .cin(rca_cin),
    .sum(rca_sum), .cout(rca_cout), .prop(rca_prop),
    .garbage(rca_garbage)
  );

  parity_checker #(
    .IN_W (2 * RCA_WIDTH + 1),
    .OUT_W(2 * RCA_WIDTH + 1 + RCA_WIDTH * FA_GARBAGE)
  ) u_rca_chk (
    .in_lines ({rca_a, rca_b, rca_cin}),
    .out_lines({rca_sum, rca_cout, rca_prop, rca_garbage}),
    .error    (rca_parity_err)
  );

  // ---------------- carry skip adder ----------------
  csa_garbage_t [CSA_BLOCKS-1:0] csa_garbage;

  pp_carry_skip_adder #(.BLOCKS(CSA_BLOCKS)) u_csa (
    .a(csa_a), .b(csa_b), .cin(csa_cin),
    .sum(csa_sum), .cout(csa_cout), .skip(csa_skip),
    .garbage(csa_garbage)
  );

  parity_checker #(
    .IN_W (2 * CSA_WIDTH + 1),
    .OUT_W(CSA_WIDTH + 1 + CSA_BLOCKS * CSA_GARBAGE)
  ) u_csa_chk (
    .in_lines ({csa_a, csa_b, csa_cin}),
    .out_lines({csa_sum, csa_cout, csa_garbage}),
    .error    (csa_parity_err)
  );

endmodule

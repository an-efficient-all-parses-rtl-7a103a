// systolic_parser: systolic array that recognises a string of a context-free
// grammar (Chomsky normal form, tables in cfl_pkg) and then outputs every
// parse tree of it, one tree per stage.
//
// Structure: a triangular P-array of N(N+1)/2 processors that builds the CKY
// recognition matrix R(i,j) (the productions that derive a_i..a_j) and later
// searches it for the children of each tree node, and a triangular Q-array of
// the same size in which each stage leaves one parse tree: Q(i,j) holds the
// tree's production from R(i,j). The MATCH instructions leaving the left
// column of the P-array feed the Q-array rows; the left end of every Q-array
// row feeds back (toroidally) into the primary P-processor of that row.
//
// Interface and timing (clock 1 = first symbol):
//   * sym_in: a_1..a_N on clocks 1..N (valid=1), then $ (valid=1, eoi=1) on
//     clock N+1. The string length must equal N.
//   * accept or reject rises after clock 3N-1 and stays high until reset.
//   * Stage 1 starts in clock 3N-1 when the string is accepted; stage k+1
//     starts 6N-3 clocks after stage k. tree_valid is high for one clock
//     near the end of each stage while tree[i][j] holds the new tree (entries
//     with pvalid=0 are not part of it; i <= j only).
//   * all_done rises at the start of the stage that would follow the last
//     tree.
//   * After a reject, or with all_done, P(N,N) sends a stop wave back
//     through the array; halted rises when it has reached P(1,1), 2N-2
//     clocks after reject or all_done. The array then does nothing until
//     reset.
// rst is synchronous and active high and must be applied before each string.
module systolic_parser
  import cfl_pkg::*;
#(
  parameter int N = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  sym_in_t sym_in,
  output logic    accept,
  output logic    reject,
  output logic    tree_valid,
  output qreg_t   tree       [1:N][1:N],
  output logic    all_done,
  output logic    halted,
  output pset_t   prim_entry [1:N]
);

  match_t m_left  [1:N];
  logic   bp_left [1:N];
  logic   ep_left [1:N];
  logic   stop_left [1:N];
  qreg_t  q_prim  [1:N];
  logic   next_stage;

  p_array #(.N(N)) u_p_array (
    .clk, .rst,
    .sym_in     (sym_in),
    .accept     (accept),
    .reject     (reject),
    .all_done   (all_done),
    .prim_entry (prim_entry),
    .m_left     (m_left),
    .bp_left    (bp_left),
    .ep_left    (ep_left),
    .stop_left  (stop_left),
    .halted     (halted),
    .q_prim     (q_prim),
    .next_stage (next_stage)
  );

  q_array #(.N(N)) u_q_array (
    .clk, .rst,
    .m_right    (m_left),
    .bp_right   (bp_left),
    .ep_right   (ep_left),
    .stop_right (stop_left),
    .q_prim     (q_prim),
    .next_stage (next_stage),
    .tree_valid (tree_valid),
    .tree       (tree)
  );

endmodule

// cfl_pkg: grammar tables, shared types and set functions of the systolic
// all-parses context-free parser.
//
// The grammar is held as constant tables: a context-free grammar in Chomsky
// normal form whose productions are numbered 0..NPROD-1. That numbering is
// the order of the "ordered subsets" of productions kept in every processor:
// a set of productions (pset_t) is one bit per production, bit k set when
// production k is a member, and "the first production with left side A" is
// the lowest-numbered member with that left side.
//
// The default tables are the example grammar used throughout the design
// description: nonterminals S, A, B, C (S is the start symbol), terminals
// a, b, and the nine productions
//   0 S->AA  1 S->AB  2 A->AC  3 A->CB  4 B->BC  5 C->CC  6 A->a  7 B->b  8 C->a
// To parse another grammar, edit the tables below (and the widths).
//
// Besides the grammar the package defines the records that move through the
// array: a cell (tag, sym, pset), the MATCH instruction and the register set
// of a Q-processor. The position field l of an id is L_W bits wide, which
// bounds the array size to N < 2**L_W.
package cfl_pkg;

  // ---------------------------------------------------------------- grammar
  localparam int NNT    = 4;            // nonterminals: S, A, B, C
  localparam int NTERM  = 2;            // terminals: a, b
  localparam int NPROD  = 9;            // productions
  localparam int NT_W   = 2;
  localparam int TERM_W = $clog2(NTERM);
  localparam int PROD_W = 4;
  localparam int L_W    = 8;            // width of the position part of an id

  localparam logic [NT_W-1:0] NT_S = 2'd0;
  localparam logic [NT_W-1:0] NT_A = 2'd1;
  localparam logic [NT_W-1:0] NT_B = 2'd2;
  localparam logic [NT_W-1:0] NT_C = 2'd3;
  localparam logic [NT_W-1:0] START_SYMBOL = NT_S;

  // production k: LHS -> RHS1 RHS2 (binary) or LHS -> TERM (terminal)
  localparam logic [NT_W-1:0]   PROD_LHS  [NPROD] = '{NT_S, NT_S, NT_A, NT_A, NT_B, NT_C, NT_A, NT_B, NT_C};
  localparam logic [NT_W-1:0]   PROD_RHS1 [NPROD] = '{NT_A, NT_A, NT_A, NT_C, NT_B, NT_C, NT_S, NT_S, NT_S};
  localparam logic [NT_W-1:0]   PROD_RHS2 [NPROD] = '{NT_A, NT_B, NT_C, NT_B, NT_C, NT_C, NT_S, NT_S, NT_S};
  localparam logic              PROD_BIN  [NPROD] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam logic [TERM_W-1:0] PROD_TERM [NPROD] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0};

  // ------------------------------------------------------------------ types
  typedef logic [NPROD-1:0]  pset_t;    // ordered subset of productions
  typedef logic [NNT-1:0]    ntset_t;   // set of nonterminals
  typedef logic [NT_W-1:0]   nt_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [L_W-1:0]    pos_t;

  typedef enum logic [1:0] {
    TAG_NULL    = 2'd0,
    TAG_FIRST   = 2'd1,
    TAG_CURRENT = 2'd2,
    TAG_NEXT    = 2'd3
  } tag_e;

  // one input symbol per clock: a terminal, or the end-of-input marker $
  typedef struct packed {
    logic              valid;
    logic              eoi;
    logic [TERM_W-1:0] term;
  } sym_in_t;

  // a cell of a P-processor; tag != TAG_NULL means the cell is marked
  typedef struct packed {
    tag_e  tag;
    nt_t   sym;
    pset_t pset;
  } cell_t;

  // MATCH(pi, (tag1, tag2), (l, b), last_id); distg marks a "distinguished"
  // production (the last one with its left side in the entry)
  typedef struct packed {
    logic  valid;
    prod_t prod;
    logic  distg;
    tag_e  tag1;
    tag_e  tag2;
    pos_t  l;
    logic  b;
    logic  last_id;
  } match_t;

  // registers of a Q-processor: p (with its distinguished bit), id,
  // last_id, ldone, done, rdone
  typedef struct packed {
    logic  pvalid;
    prod_t prod;
    logic  distg;
    pos_t  l;
    logic  b;
    logic  last_id;
    logic  ldone;
    logic  done;
    logic  rdone;
  } qreg_t;

  // -------------------------------------------------------------- functions
  // set of left-hand sides of the productions in s
  function automatic ntset_t lhs_set(pset_t s);
    ntset_t r = '0;
    for (int k = 0; k < NPROD; k++)
      if (s[k]) r[PROD_LHS[k]] = 1'b1;
    return r;
  endfunction

  // R1 * R2: binary productions A->BC with B a left side in R1 and C in R2
  function automatic pset_t conv(pset_t r1, pset_t r2);
    pset_t  r = '0;
    ntset_t l1 = lhs_set(r1);
    ntset_t l2 = lhs_set(r2);
    for (int k = 0; k < NPROD; k++)
      if (PROD_BIN[k] && l1[PROD_RHS1[k]] && l2[PROD_RHS2[k]]) r[k] = 1'b1;
    return r;
  endfunction

  // { A -> t } for terminal t
  function automatic pset_t term_set(logic [TERM_W-1:0] t);
    pset_t r = '0;
    for (int k = 0; k < NPROD; k++)
      if (!PROD_BIN[k] && PROD_TERM[k] == t) r[k] = 1'b1;
    return r;
  endfunction

  // members of s whose left side is a
  function automatic pset_t with_lhs(pset_t s, nt_t a);
    pset_t r = '0;
    for (int k = 0; k < NPROD; k++)
      if (s[k] && PROD_LHS[k] == a) r[k] = 1'b1;
    return r;
  endfunction

  // first member of s numbered above 'after' (or from 0 when from_start);
  // found, its number and whether it is the last such member
  function automatic logic [PROD_W+1:0] pick_prod(pset_t s, logic from_start, prod_t after);
    logic  found = 1'b0;
    logic  more  = 1'b0;
    prod_t idx   = '0;
    for (int k = 0; k < NPROD; k++) begin
      if (s[k] && (from_start || k > int'(after))) begin
        if (!found) begin
          found = 1'b1;
          idx   = prod_t'(k);
        end else begin
          more = 1'b1;
        end
      end
    end
    return {found, idx, found && !more};
  endfunction

  // does nonterminal set l hold a
  function automatic logic has_nt(ntset_t l, nt_t a);
    return l[a];
  endfunction

endpackage

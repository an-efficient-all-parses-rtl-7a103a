// p_proc: one processor P(I,J) of the triangular P-array (column I, row J,
// 1 <= I <= J <= N).
//
// Recognition (forward sweeps). A processor is idle until the "start" wave
// reaches it, at forward sweep J, and stops when the "halt" wave reaches it,
// at sweep N+1. Every active cycle it
//   * loads its four production-set registers r00, r01, r10, r11 from the
//     terminals IN00..IN11 (a secondary, I < J); when 2I = J, IN00 and IN10
//     are crossed (r00 <- IN10, r10 <- IN00) and so are the outputs of r01
//     and r11 (OUT01 <- r11, OUT11 <- r01);
//   * passes v_in OR (r00*r01) OR (r10*r11) to its right neighbour on the
//     horizontal chain (a secondary), or stores the arriving value v_in as
//     the new recognition-matrix entry in r01 and r10 (a primary, I = J);
//     P(1,1) instead stores { A -> a_i } for the input symbol a_i;
//   * in the cycle the start wave arrives, copies the new r01 and r11 into
//     t0 and t1.
// Each r register is the first clock of its outgoing link; the array adds
// the extra link stages (OUT00: 3 clocks, OUT01: 1, OUT10: 2, OUT11: 2).
// P(N,N), on the halt wave, decides acceptance: R(1,N) (in r01) holds a
// production of the start symbol.
//
// Parse generation (reverse sweeps). Active from the "begin-parse" wave
// (reverse sweep 1) to the "end-parse" wave (reverse sweep N-J+1), each stage.
// Four cells C00..C11 (tag, sym, pset) travel the forward paths backwards
// with the same delays, so that at reverse sweep r the cells hold what the r
// registers held at forward sweep N-r+1. Exceptions: at reverse sweep 1
// C00 and C10 are loaded from r00 and r10, and at reverse sweep N-J+1 C01
// and C11 are loaded from t0 and t1.
//   * A secondary searches its cell pairs (C00,C01) then (C10,C11) for the
//     MATCH instruction arriving from the right: the first pair at or after
//     the position (l,b) whose left cell has a production with left side B
//     and right cell one with left side C (for pi = A->BC) is marked with
//     (B, tag1) and (C, tag2); the instruction continues left with tags NULL
//     and id = (I, pair); a later matching pair clears last_id.
//   * A primary that holds a marked cell issues a MATCH to its left, chosen
//     from the cell's tag and the Q-array record I (q_in) of the same entry
//     from the previous stage: CURRENT repeats the old choice; FIRST takes the
//     first production with the cell's symbol and searches from (J-1,0); NEXT
//     advances the right subtree, else the left one, else the split point
//     (id moves to the next cell pair), else the production.
//   * P(N,N) starts every stage: stage 1 when acceptance is found (the same
//     cycle as the halt wave), each later stage when the Q-array hands it
//     record I (next_stage). It marks C01 with the start symbol and FIRST
//     (stage 1) or NEXT (later), or, if I says the last tree was the final
//     one, raises all_done and starts nothing.
//   * On reject, and when it raises all_done, P(N,N) sends a "stop" wave
//     back over the begin-parse routes (left and up, 1 clock per hop) to
//     every processor, P(1,1) last, and on into the Q-array. A processor the
//     stop wave has passed is halted: it takes part in no further stage.
// All outputs are registered; a processor knows only its indices I, J, N.
//
// Own choices: the halt and begin-parse of stage 1 coincide at P(N,N);
// cells loaded from r or t registers carry tag NULL; a primary that sees two
// marked cells uses C01.
module p_proc
  import cfl_pkg::*;
#(
  parameter int N = 4,
  parameter int I = 1,
  parameter int J = 1
) (
  input  logic          clk,
  input  logic          rst,
  // forward (recognition)
  input  sym_in_t       sym_in,       // input symbols, used by P(1,1) only
  input  pset_t         v_in,         // IN_v from the left neighbour
  output pset_t         v_out,        // OUT_v to the right neighbour
  input  pset_t [3:0]   fin,          // IN_pq, index {p,q}
  output pset_t [3:0]   fout,         // OUT_pq (first link clock)
  input  logic          start_in,
  output logic          start_out,    // 1-clock copy of the start wave
  input  logic          halt_in,
  output logic          halt_out,
  output logic          accept,       // P(N,N): string accepted
  output logic          reject,       // P(N,N): string rejected
  // reverse (parse generation)
  input  cell_t [3:0]   bin,          // cells coming back on OUT_pq
  output cell_t [3:0]   bout,         // cells going back on IN_pq
  input  match_t        m_in,         // MATCH from the right neighbour
  output match_t        m_out,        // MATCH to the left neighbour
  input  logic          bp_in,        // begin-parse wave
  output logic          bp_out,
  input  logic          ep_in,        // end-parse wave
  output logic          ep_out,
  input  qreg_t         q_in,         // primary: record I from the Q-array
  input  logic          next_stage,   // P(N,N): record I of Q(1,N) present
  output logic          all_done,     // P(N,N): no further parse tree
  input  logic          stop_in,      // stop wave (reject or last tree done)
  output logic          stop_out,
  output logic          halted        // the stop wave has passed here
);

  localparam bit PRIMARY = (I == J);
  localparam bit SWITCH  = (!PRIMARY) && (2 * I == J);
  localparam bit ORIGIN  = (I == 1) && (J == 1);
  localparam bit LAST    = (I == N) && (J == N);

  // ------------------------------------------------------------ registers
  pset_t [3:0] r;
  pset_t       t0, t1;
  cell_t [3:0] c;
  logic        fwd_active, rev_active;
  logic        started;                 // P(1,1): start wave already sent
  logic        first_stage;             // P(N,N): next stage is stage 1

  // ----------------------------------------------------------- forward
  logic  start_now, halt_now, fwd_en;
  pset_t entry;
  pset_t [3:0] r_new;
  pset_t       v_new;

  assign start_now = ORIGIN ? (sym_in.valid && !sym_in.eoi && !started) : start_in;
  assign halt_now  = ORIGIN ? (sym_in.valid && sym_in.eoi) : halt_in;
  assign fwd_en    = (fwd_active || start_now) && !halt_now;

  assign entry = ORIGIN ? term_set(sym_in.term) : v_in;

  always_comb begin
    r_new = r;
    v_new = '0;
    if (PRIMARY) begin
      r_new[0] = '0;                    // r00
      r_new[1] = entry;                 // r01
      r_new[2] = entry;                 // r10
      r_new[3] = '0;                    // r11
    end else if (SWITCH) begin
      r_new[0] = fin[2];
      r_new[1] = fin[1];
      r_new[2] = fin[0];
      r_new[3] = fin[3];
    end else begin
      r_new = fin;
    end
    if (!PRIMARY)
      v_new = v_in | conv(r_new[0], r_new[1]) | conv(r_new[2], r_new[3]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r          <= '0;
      t0         <= '0;
      t1         <= '0;
      v_out      <= '0;
      fwd_active <= 1'b0;
      started    <= 1'b0;
      start_out  <= 1'b0;
      halt_out   <= 1'b0;
    end else begin
      start_out <= start_now;
      halt_out  <= halt_now;
      if (start_now) started <= 1'b1;
      if (halt_now)
        fwd_active <= 1'b0;
      else if (start_now)
        fwd_active <= 1'b1;
      v_out <= '0;
      if (fwd_en) begin
        r     <= r_new;
        v_out <= v_new;
        if (start_now) begin
          t0 <= r_new[1];
          t1 <= r_new[3];
        end
      end
    end
  end

  always_comb begin
    fout = r;
    if (SWITCH) begin
      fout[1] = r[3];
      fout[3] = r[1];
    end
    if (PRIMARY) begin
      fout[0] = '0;
      fout[3] = '0;
    end
  end

  // acceptance at P(N,N)
  logic accept_now;
  assign accept_now = LAST && halt_now && has_nt(lhs_set(r[1]), START_SYMBOL);

  // ----------------------------------------------------------- reverse
  logic   bp_now, ep_now, rev_en, stage_go;
  cell_t [3:0] c_in, c_new;
  match_t m_new;

  // P(N,N) starts a stage itself; record I says whether one is left
  assign stage_go = LAST && ((accept_now && first_stage) || (next_stage && !first_stage && !q_in.done));
  assign bp_now   = LAST ? stage_go : bp_in;
  assign ep_now   = LAST ? stage_go : ep_in;
  assign rev_en   = (rev_active || bp_now) && !halted;

  // stop wave: P(N,N) starts it on reject or when record I says the last
  // tree has been output; it follows the begin-parse routes
  logic stop_now;
  assign stop_now = LAST ? ((halt_now && !accept_now) || (next_stage && !first_stage && q_in.done))
                         : stop_in;

  // cells arriving back on the output terminals
  always_comb begin
    c_in = bin;
    if (SWITCH) begin
      c_in[1] = bin[3];
      c_in[3] = bin[1];
    end
    if (PRIMARY) begin
      c_in[0] = '0;
      c_in[3] = '0;
    end
  end

  // updated cells, then the MATCH step on them
  always_comb begin
    cell_t       mc;
    logic        have_mark;
    logic        searching;
    logic        hit;
    logic [PROD_W+1:0] pk;
    ntset_t      lf, rt;

    c_new = c_in;
    if (bp_now) begin
      c_new[0] = '{tag: TAG_NULL, sym: '0, pset: r[0]};
      c_new[2] = '{tag: TAG_NULL, sym: '0, pset: r[2]};
    end
    if (ep_now) begin
      c_new[1] = '{tag: TAG_NULL, sym: '0, pset: t0};
      c_new[3] = '{tag: TAG_NULL, sym: '0, pset: t1};
    end
    m_new = '0;

    if (PRIMARY) begin
      if (LAST && bp_now) begin
        c_new[1].sym = START_SYMBOL;
        c_new[1].tag = first_stage ? TAG_FIRST : TAG_NEXT;
      end
      have_mark = 1'b1;
      if (c_new[1].tag != TAG_NULL)      mc = c_new[1];
      else if (c_new[2].tag != TAG_NULL) mc = c_new[2];
      else begin
        mc        = '0;
        have_mark = 1'b0;
      end
      if (have_mark) begin
        // CURRENT and NEXT rely on record I; FIRST does not
        m_new.valid = (mc.tag == TAG_FIRST) || q_in.pvalid;
        unique case (mc.tag)
          TAG_CURRENT: begin
            m_new.prod = q_in.prod;  m_new.distg = q_in.distg;
            m_new.tag1 = TAG_CURRENT; m_new.tag2 = TAG_CURRENT;
            m_new.l    = q_in.l;     m_new.b    = q_in.b;
            m_new.last_id = q_in.last_id;
          end
          TAG_NEXT: begin
            m_new.prod = q_in.prod;  m_new.distg = q_in.distg;
            m_new.l    = q_in.l;     m_new.b    = q_in.b;
            m_new.last_id = q_in.last_id;
            if (!q_in.rdone) begin
              m_new.tag1 = TAG_CURRENT; m_new.tag2 = TAG_NEXT;
            end else if (!q_in.ldone) begin
              m_new.tag1 = TAG_NEXT;    m_new.tag2 = TAG_FIRST;
            end else if (!q_in.last_id) begin
              // next split point: (l,0) -> (l,1), (l,1) -> (l-1,0)
              m_new.tag1 = TAG_FIRST; m_new.tag2 = TAG_FIRST;
              m_new.last_id = 1'b1;
              if (!q_in.b) m_new.b = 1'b1;
              else begin
                m_new.b = 1'b0;
                m_new.l = q_in.l - pos_t'(1);
              end
            end else begin
              // next production with the same left side
              pk = pick_prod(with_lhs(mc.pset, mc.sym), 1'b0, q_in.prod);
              m_new.valid = pk[PROD_W+1];
              m_new.prod  = pk[PROD_W:1];
              m_new.distg  = pk[0];
              m_new.tag1  = TAG_FIRST; m_new.tag2 = TAG_FIRST;
              m_new.l     = pos_t'(J - 1); m_new.b = 1'b0;
              m_new.last_id = 1'b1;
            end
          end
          default: begin          // TAG_FIRST
            pk = pick_prod(with_lhs(mc.pset, mc.sym), 1'b1, '0);
            m_new.valid = pk[PROD_W+1];
            m_new.prod  = pk[PROD_W:1];
            m_new.distg  = pk[0];
            m_new.tag1  = TAG_FIRST; m_new.tag2 = TAG_FIRST;
            m_new.l     = pos_t'(J - 1); m_new.b = 1'b0;
            m_new.last_id = 1'b1;
          end
        endcase
      end
    end else begin
      // secondary: search the pairs (C00,C01) then (C10,C11)
      m_new     = m_in;
      searching = m_in.valid && (m_in.tag1 != TAG_NULL);
      for (int pr = 0; pr < 2; pr++) begin
        lf  = lhs_set(c_new[2*pr].pset);
        rt  = lhs_set(c_new[2*pr+1].pset);
        hit = has_nt(lf, PROD_RHS1[m_in.prod]) && has_nt(rt, PROD_RHS2[m_in.prod]);
        if (m_in.valid && hit) begin
          if (searching) begin
            if (int'(m_in.l) > I || (int'(m_in.l) == I && pr >= int'(m_in.b))) begin
              c_new[2*pr].sym   = PROD_RHS1[m_in.prod];
              c_new[2*pr].tag   = m_new.tag1;
              c_new[2*pr+1].sym = PROD_RHS2[m_in.prod];
              c_new[2*pr+1].tag = m_new.tag2;
              m_new.tag1 = TAG_NULL;
              m_new.tag2 = TAG_NULL;
              m_new.l    = pos_t'(I);
              m_new.b    = 1'(pr);
              searching  = 1'b0;
            end
          end else begin
            m_new.last_id = 1'b0;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c           <= '0;
      m_out       <= '0;
      rev_active  <= 1'b0;
      bp_out      <= 1'b0;
      ep_out      <= 1'b0;
      first_stage <= 1'b1;
      accept      <= 1'b0;
      reject      <= 1'b0;
      all_done    <= 1'b0;
      stop_out    <= 1'b0;
      halted      <= 1'b0;
    end else begin
      stop_out <= stop_now;
      if (stop_now) halted <= 1'b1;
      bp_out <= bp_now;
      ep_out <= ep_now;
      if (ep_now)
        rev_active <= 1'b0;
      else if (bp_now)
        rev_active <= 1'b1;
      m_out <= '0;
      if (rev_en) begin
        c     <= c_new;
        m_out <= m_new;
      end
      if (LAST) begin
        if (accept_now) accept <= 1'b1;
        if (halt_now && !accept_now) reject <= 1'b1;
        if (stage_go) first_stage <= 1'b0;
        if (next_stage && !first_stage && q_in.done) all_done <= 1'b1;
      end
    end
  end

  // the (reversed) cells leave on the input terminals
  always_comb begin
    bout = c;
    if (SWITCH) begin
      bout[0] = c[2];
      bout[2] = c[0];
    end
    if (PRIMARY) bout = '0;
  end

endmodule

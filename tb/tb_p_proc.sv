// tb_p_proc: unit test of the P-processor in four positions:
// a plain secondary P(3,5), a crossing secondary P(2,4) (2i = j), a primary
// P(2,2) and the corner P(3,3) of a 3x3 array. Expected values are worked
// out here from the grammar tables.
//   * forward: each r register takes its input (crossed at 2i = j), the
//     outputs show it one clock later (OUT01/OUT11 crossed at 2i = j),
//     v_out = v_in | r00*r01 | r10*r11, t0/t1 capture r01/r11 in the start
//     clock only, nothing moves after halt;
//   * acceptance at the corner processor, and its stop wave on reject;
//   * the stop wave passed on by one clock, halting the processor;
//   * MATCH in a secondary: first eligible matching pair is marked (sym,
//     tag), the instruction leaves with NULL tags and id = (I, pair); search
//     starting at (I,1) skips pair 0; a pass-through with NULL tags clears
//     last_id on a match; an instruction for a processor further left
//     (l < I) passes unchanged; the marked cells leave on the back links;
//   * MATCH issued by the primary for marked cells tagged FIRST, CURRENT
//     and NEXT (cases a, b, c with last_id false, c with last_id true).
module tb_p_proc;
  import cfl_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  // common stimulus
  sym_in_t     sym_in;
  pset_t       v_in;
  pset_t [3:0] fin;
  logic        start_in, halt_in, bp_in, ep_in, next_stage, stop_in;
  cell_t [3:0] bin;
  match_t      m_in;
  qreg_t       q_in;

  // per-instance outputs: 0 = P(3,5), 1 = P(2,4), 2 = P(2,2), 3 = P(3,3) of N=3
  pset_t       v_out  [4];
  pset_t [3:0] fout   [4];
  cell_t [3:0] bout   [4];
  match_t      m_out  [4];
  logic        so [4], ho [4], acc [4], rej [4], bpo [4], epo [4], ad [4], sto [4], hl [4];

  p_proc #(.N(5), .I(3), .J(5)) u_sec (.clk, .rst, .sym_in, .v_in, .v_out(v_out[0]), .fin, .fout(fout[0]),
    .start_in, .start_out(so[0]), .halt_in, .halt_out(ho[0]), .accept(acc[0]), .reject(rej[0]),
    .bin, .bout(bout[0]), .m_in, .m_out(m_out[0]), .bp_in, .bp_out(bpo[0]), .ep_in, .ep_out(epo[0]),
    .q_in, .next_stage, .all_done(ad[0]), .stop_in, .stop_out(sto[0]), .halted(hl[0]));
  p_proc #(.N(5), .I(2), .J(4)) u_sw (.clk, .rst, .sym_in, .v_in, .v_out(v_out[1]), .fin, .fout(fout[1]),
    .start_in, .start_out(so[1]), .halt_in, .halt_out(ho[1]), .accept(acc[1]), .reject(rej[1]),
    .bin, .bout(bout[1]), .m_in, .m_out(m_out[1]), .bp_in, .bp_out(bpo[1]), .ep_in, .ep_out(epo[1]),
    .q_in, .next_stage, .all_done(ad[1]), .stop_in, .stop_out(sto[1]), .halted(hl[1]));
  p_proc #(.N(5), .I(2), .J(2)) u_prim (.clk, .rst, .sym_in, .v_in, .v_out(v_out[2]), .fin, .fout(fout[2]),
    .start_in, .start_out(so[2]), .halt_in, .halt_out(ho[2]), .accept(acc[2]), .reject(rej[2]),
    .bin, .bout(bout[2]), .m_in, .m_out(m_out[2]), .bp_in, .bp_out(bpo[2]), .ep_in, .ep_out(epo[2]),
    .q_in, .next_stage, .all_done(ad[2]), .stop_in, .stop_out(sto[2]), .halted(hl[2]));
  p_proc #(.N(3), .I(3), .J(3)) u_last (.clk, .rst, .sym_in, .v_in, .v_out(v_out[3]), .fin, .fout(fout[3]),
    .start_in, .start_out(so[3]), .halt_in, .halt_out(ho[3]), .accept(acc[3]), .reject(rej[3]),
    .bin, .bout(bout[3]), .m_in, .m_out(m_out[3]), .bp_in, .bp_out(bpo[3]), .ep_in, .ep_out(epo[3]),
    .q_in, .next_stage, .all_done(ad[3]), .stop_in, .stop_out(sto[3]), .halted(hl[3]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference product, written from the grammar tables
  function automatic pset_t ref_conv(pset_t a, pset_t b);
    pset_t r = '0;
    for (int k = 0; k < NPROD; k++) begin
      bit ha = 0, hb = 0;
      for (int m = 0; m < NPROD; m++) begin
        if (a[m] && PROD_LHS[m] == PROD_RHS1[k]) ha = 1;
        if (b[m] && PROD_LHS[m] == PROD_RHS2[k]) hb = 1;
      end
      if (PROD_BIN[k] && ha && hb) r[k] = 1'b1;
    end
    return r;
  endfunction

  function automatic cell_t mkcell(pset_t p);
    return '{tag: TAG_NULL, sym: '0, pset: p};
  endfunction

  localparam pset_t P_A  = 9'b001000100;   // A->a (6), A->CB (3)
  localparam pset_t P_B  = 9'b010010000;   // B->b (7), B->BC (4)
  localparam pset_t P_C  = 9'b100100000;   // C->a (8), C->CC (5)
  localparam pset_t P_AC = P_A | P_C;

  pset_t [3:0] prev, first;
  pset_t       prev_v;

  task automatic idle();
    sym_in = '0; v_in = '0; fin = '0; start_in = 0; halt_in = 0; bp_in = 0; ep_in = 0;
    next_stage = 0; stop_in = 0; bin = '0; m_in = '0; q_in = '0;
  endtask

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // ------------------------------------------------------------ forward
    for (int k = 0; k < 6; k++) begin
      for (int p = 0; p < 4; p++) fin[p] = pset_t'($urandom);
      v_in     = pset_t'($urandom);
      start_in = (k == 0);
      if (k == 0) first = fin;
      prev = fin; prev_v = v_in;
      @(negedge clk);
      // plain secondary
      check(fout[0] == prev, $sformatf("P(3,5) clock %0d: outputs not equal to inputs", k));
      check(v_out[0] == (prev_v | ref_conv(prev[0], prev[1]) | ref_conv(prev[2], prev[3])),
            $sformatf("P(3,5) clock %0d: OUT_v wrong", k));
      // crossing secondary: r00<-IN10 r10<-IN00, OUT01<-r11 OUT11<-r01
      check(fout[1][0] == prev[2] && fout[1][2] == prev[0] && fout[1][1] == prev[3] && fout[1][3] == prev[1],
            $sformatf("P(2,4) clock %0d: crossing wrong", k));
      check(v_out[1] == (prev_v | ref_conv(prev[2], prev[1]) | ref_conv(prev[0], prev[3])),
            $sformatf("P(2,4) clock %0d: OUT_v wrong", k));
      // primary stores v_in in r01 and r10
      check(fout[2][1] == prev_v && fout[2][2] == prev_v && fout[2][0] == '0 && fout[2][3] == '0,
            $sformatf("P(2,2) clock %0d: entry not stored", k));
      check(v_out[2] == '0, "primary sends nothing right");
    end
    // halt: nothing changes afterwards
    halt_in = 1; fin[1] = ~prev[1]; v_in = ~prev_v;
    @(negedge clk);
    halt_in = 0;
    check(fout[0] == prev && fout[2][1] == prev_v, "halt freezes the registers");
    check(u_sec.t0 == first[1] && u_sec.t1 == first[3], "t0/t1 hold r01/r11 of the start clock");
    check(ho[0] && so[0] == 0, "halt copied on");
    // ----------------------------------------------------- acceptance at P(3,3) of N=3
    rst = 1; @(negedge clk); rst = 0;
    start_in = 1; v_in = P_A; @(negedge clk);       // R(1,3) contains A->CB only: no S
    start_in = 0; halt_in = 1; @(negedge clk);
    halt_in = 0;
    check(rej[3] && !acc[3], "corner rejects an entry without the start symbol");
    check(sto[3] && hl[3], "corner sends the stop wave on reject");
    check(!sto[0] && !hl[0], "no stop wave from a secondary without stop_in");
    stop_in = 1; @(negedge clk); stop_in = 0;
    check(sto[0] && hl[0] && sto[2] && hl[2], "stop wave passed on and halts the processor");
    @(negedge clk);
    check(!sto[0] && hl[0], "stop wave is one clock long, halted stays");
    rst = 1; @(negedge clk); rst = 0;
    start_in = 1; v_in = 9'b000000010; @(negedge clk);   // S->AB
    start_in = 0; halt_in = 1;
    #1 check(u_last.m_new.valid && u_last.m_new.prod == 4'd1 && u_last.m_new.distg && u_last.m_new.l == 8'd2,
             "corner issues MATCH(S->AB distinguished, (FIRST,FIRST), (N-1,0)) in the halt clock");
    @(negedge clk);
    halt_in = 0;
    check(acc[3] && !rej[3], "corner accepts an entry with the start symbol");
    check(!sto[3] && !hl[3], "no stop wave on accept");
    check(m_out[3].valid && m_out[3].tag1 == TAG_FIRST && m_out[3].tag2 == TAG_FIRST && m_out[3].last_id,
          "stage-1 MATCH tags and last_id");
    // ------------------------------------------------------------ MATCH in P(3,5)
    rst = 1; @(negedge clk); rst = 0;
    // forward once so r00 = A-set, r10 = A-set
    start_in = 1; fin = '{P_C, P_AC, P_B, P_A}; @(negedge clk);   // fin[3]=P_C fin[2]=P_AC fin[1]=P_B fin[0]=P_A
    start_in = 0; halt_in = 1; @(negedge clk); halt_in = 0;
    // reverse sweep 1: C00 <- r00 (A), C10 <- r10 (A,C); C01, C11 from the back links
    bp_in = 1;
    bin = '{mkcell(P_B), '0, mkcell(P_B), '0};       // bin[3] = B, bin[1] = B
    m_in = '{valid: 1'b1, prod: 4'd1, distg: 1'b0, tag1: TAG_FIRST, tag2: TAG_NEXT,
             l: 8'd4, b: 1'b0, last_id: 1'b1};      // S->AB, search from (4,0)
    #1;
    check(u_sec.m_new.tag1 == TAG_NULL && u_sec.m_new.l == 8'd3 && u_sec.m_new.b == 1'b0,
          "first matching pair (3,0) found");
    check(u_sec.m_new.last_id == 1'b0, "second matching pair clears last_id");
    @(negedge clk);
    bp_in = 0;
    check(bout[0][0].tag == TAG_FIRST && bout[0][0].sym == NT_A && bout[0][1].tag == TAG_NEXT && bout[0][1].sym == NT_B,
          "pair 0 cells marked (A,FIRST) (B,NEXT) and sent back");
    check(bout[0][2].tag == TAG_NULL && bout[0][3].tag == TAG_NULL, "pair 1 not marked");
    check(m_out[0].valid && m_out[0].prod == 4'd1 && m_out[0].tag1 == TAG_NULL, "instruction passed on");
    // search starting at (3,1): pair 0 skipped; C00/C10 now come from the back links
    bin = '{mkcell(P_B), mkcell(P_AC), mkcell(P_B), mkcell(P_A)};
    m_in.l = 8'd3; m_in.b = 1'b1; m_in.tag1 = TAG_CURRENT; m_in.tag2 = TAG_CURRENT; m_in.last_id = 1'b1;
    #1;
    check(u_sec.m_new.l == 8'd3 && u_sec.m_new.b == 1'b1 && u_sec.m_new.last_id, "search from (3,1) takes pair 1");
    @(negedge clk);
    check(bout[0][2].tag == TAG_CURRENT && bout[0][3].tag == TAG_CURRENT && bout[0][0].tag == TAG_NULL,
          "pair 1 cells marked CURRENT");
    // instruction already matched (NULL tags): clears last_id, marks nothing
    m_in.tag1 = TAG_NULL; m_in.tag2 = TAG_NULL; m_in.l = 8'd4; m_in.b = 1'b0; m_in.last_id = 1'b1;
    #1;
    check(!u_sec.m_new.last_id && u_sec.m_new.l == 8'd4 && u_sec.m_new.tag1 == TAG_NULL,
          "pass-through after a match clears last_id");
    @(negedge clk);
    check(bout[0][0].tag == TAG_NULL && bout[0][2].tag == TAG_NULL, "pass-through marks nothing");
    // start position further left: passes unchanged
    m_in.tag1 = TAG_FIRST; m_in.tag2 = TAG_FIRST; m_in.l = 8'd2; m_in.b = 1'b0; m_in.last_id = 1'b1;
    #1;
    check(u_sec.m_new == m_in, "instruction for a processor further left passes unchanged");
    // no matching pair: S->AA needs A on the right
    m_in.prod = 4'd0; m_in.l = 8'd4;
    #1;
    check(u_sec.m_new == m_in, "no match: instruction unchanged");
    ep_in = 1;
    @(negedge clk);
    ep_in = 0; m_in = '0;
    @(negedge clk);
    check(m_out[0] == '0, "no MATCH after end-parse");
    // ------------------------------------------------------------ primary P(2,2)
    // marked cell arriving as C01 (bin[1]) with entry {A->AC, A->CB}
    bp_in = 1;
    bin = '0;
    bin[1] = '{tag: TAG_FIRST, sym: NT_A, pset: 9'b000001100};
    q_in = '{pvalid: 1'b1, prod: 4'd2, distg: 1'b0, l: 8'd1, b: 1'b1, last_id: 1'b0,
             ldone: 1'b1, done: 1'b0, rdone: 1'b1};
    @(negedge clk);
    bp_in = 0;
    check(m_out[2].valid && m_out[2].prod == 4'd2 && !m_out[2].distg && m_out[2].tag1 == TAG_FIRST &&
          m_out[2].l == 8'd1 && m_out[2].b == 1'b0 && m_out[2].last_id, "FIRST: first A production, search from (J-1,0)");
    bin[1].pset = 9'b000001000;
    @(negedge clk);
    check(m_out[2].prod == 4'd3 && m_out[2].distg, "FIRST: only production is distinguished");
    bin[1] = '0; bin[2] = '{tag: TAG_CURRENT, sym: NT_A, pset: 9'b000001100};
    @(negedge clk);
    check(m_out[2].valid && m_out[2].prod == q_in.prod && m_out[2].tag1 == TAG_CURRENT && m_out[2].tag2 == TAG_CURRENT &&
          m_out[2].l == q_in.l && m_out[2].b == q_in.b, "CURRENT (cell on C10): repeats record I");
    bin[2].tag = TAG_NEXT; q_in.rdone = 1'b0;
    @(negedge clk);
    check(m_out[2].tag1 == TAG_CURRENT && m_out[2].tag2 == TAG_NEXT, "NEXT a: right subtree advances");
    q_in.rdone = 1'b1; q_in.ldone = 1'b0;
    @(negedge clk);
    check(m_out[2].tag1 == TAG_NEXT && m_out[2].tag2 == TAG_FIRST, "NEXT b: left subtree advances");
    q_in.ldone = 1'b1; q_in.last_id = 1'b0; q_in.l = 8'd1; q_in.b = 1'b0;
    @(negedge clk);
    check(m_out[2].tag1 == TAG_FIRST && m_out[2].l == 8'd1 && m_out[2].b == 1'b1 && m_out[2].last_id,
          "NEXT c: split (1,0) -> (1,1)");
    q_in.b = 1'b1;
    @(negedge clk);
    check(m_out[2].l == 8'd0 && m_out[2].b == 1'b0, "NEXT c: split (1,1) -> (0,0)");
    q_in.last_id = 1'b1;
    @(negedge clk);
    check(m_out[2].valid && m_out[2].prod == 4'd3 && m_out[2].distg && m_out[2].l == 8'd1 && m_out[2].b == 1'b0,
          "NEXT c: next production A->CB, distinguished, search from (J-1,0)");
    bin = '0;
    @(negedge clk);
    check(!m_out[2].valid, "no marked cell: no MATCH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

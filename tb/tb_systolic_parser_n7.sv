// tb_systolic_parser_n7: the end-to-end test of tb_systolic_parser run on a
// larger array, N = 7, over all 128 strings of {a,b} of length 7: the
// recognition matrix at every sweep, accept/reject and its clock, the
// number of parse trees (dynamic programming), the validity and
// distinctness of every tree, the 6N-3 clock stage period, the stop wave
// after a reject or the last tree, and the same mechanism counts.
module tb_systolic_parser_n7;
  import cfl_pkg::*;

  localparam int N      = 7;
  localparam int MAXT   = 1024;
  localparam int SIGW   = N * N * (PROD_W + 1);

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  sym_in_t sym_in;
  logic    accept, reject, tree_valid, all_done, halted;
  qreg_t   tree       [1:N][1:N];
  pset_t   prim_entry [1:N];

  systolic_parser #(.N(N)) dut (
    .clk, .rst, .sym_in, .accept, .reject, .tree_valid, .tree, .all_done, .halted, .prim_entry
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_trees = 0, n_sub = 0, n_split = 0, n_prod = 0, n_done = 0, n_stop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  logic [N:1]        w;                        // symbols (terminal numbers)
  logic [NPROD-1:0]  R   [1:N][1:N];
  longint            cnt [NNT][1:N][1:N];

  function automatic logic lhs_in(logic [NPROD-1:0] s, nt_t a);
    for (int k = 0; k < NPROD; k++)
      if (s[k] && PROD_LHS[k] == a) return 1'b1;
    return 1'b0;
  endfunction

  task automatic build_ref();
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        R[i][j] = '0;
        for (int a = 0; a < NNT; a++) cnt[a][i][j] = 0;
      end
    for (int i = 1; i <= N; i++)
      for (int k = 0; k < NPROD; k++)
        if (!PROD_BIN[k] && PROD_TERM[k] == w[i]) begin
          R[i][i][k] = 1'b1;
          cnt[PROD_LHS[k]][i][i] += 1;
        end
    for (int len = 2; len <= N; len++)
      for (int i = 1; i + len - 1 <= N; i++) begin
        int j = i + len - 1;
        for (int k = 0; k < NPROD; k++)
          if (PROD_BIN[k])
            for (int c = i; c < j; c++)
              if (lhs_in(R[i][c], PROD_RHS1[k]) && lhs_in(R[c+1][j], PROD_RHS2[k])) begin
                R[i][j][k] = 1'b1;
                cnt[PROD_LHS[k]][i][j] += cnt[PROD_RHS1[k]][i][c] * cnt[PROD_RHS2[k]][c+1][j];
              end
      end
  endtask

  // ------------------------------------------------------ tree checking
  logic [SIGW-1:0] sigs [MAXT];
  int              ntree_str;
  int              prev_root_prod, prev_root_split;
  longint          cyc;
  longint          last_tv;

  task automatic check_tree();
    int  want [1:N][1:N];                      // expected LHS, -1 = none
    bit  ok = 1;
    logic [SIGW-1:0] sig = '0;
    int  root_split = 0;
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) want[i][j] = -1;
    want[1][N] = int'(START_SYMBOL);
    for (int len = N; len >= 1; len--)
      for (int i = 1; i + len - 1 <= N; i++) begin
        int j = i + len - 1;
        qreg_t e = tree[i][j];
        if (want[i][j] < 0) begin
          if (e.pvalid) ok = 0;                // stray production
        end else if (!e.pvalid || int'(e.prod) >= NPROD || int'(PROD_LHS[e.prod]) != want[i][j]) begin
          ok = 0;
        end else if (i == j) begin
          if (PROD_BIN[e.prod] || PROD_TERM[e.prod] != w[i]) ok = 0;
        end else if (!PROD_BIN[e.prod] || !R[i][j][e.prod]) begin
          ok = 0;
        end else begin
          int leftlen = e.b ? int'(e.l) : len - int'(e.l);
          int k = i + leftlen - 1;
          if (leftlen < 1 || leftlen >= len) ok = 0;
          else begin
            if (i == 1 && j == N) root_split = k;
            if (want[i][k] >= 0 || want[k+1][j] >= 0) ok = 0;
            want[i][k]   = int'(PROD_RHS1[e.prod]);
            want[k+1][j] = int'(PROD_RHS2[e.prod]);
          end
        end
        sig[((i-1)*N + (j-1))*(PROD_W+1) +: PROD_W+1] = {e.pvalid, e.prod};
      end
    check(ok, $sformatf("tree %0d of string %b is not a valid parse tree", ntree_str + 1, w));
    for (int t = 0; t < ntree_str && t < MAXT; t++)
      check(sigs[t] != sig, $sformatf("tree %0d of string %b repeats tree %0d", ntree_str + 1, w, t + 1));
    if (ntree_str < MAXT) sigs[ntree_str] = sig;
    if (ntree_str > 0) begin
      if (int'(tree[1][N].prod) != prev_root_prod) n_prod++;
      else if (root_split != prev_root_split)      n_split++;
      else                                          n_sub++;
    end
    prev_root_prod  = int'(tree[1][N].prod);
    prev_root_split = root_split;
  endtask

  // after reject or all_done: the stop wave reaches P(1,1) 2N-2 clocks
  // later; N clocks after that it has passed the whole Q-array, and from
// then on the array is frozen (no tree, no change)
  task automatic wait_stop(input logic [N:1] ws);
    qreg_t snap [1:N][1:N];
    check(!halted, $sformatf("string %b: halted too early", ws));
    repeat (2 * N - 3) @(negedge clk);
    check(!halted, $sformatf("string %b: halted before 2N-2 clocks", ws));
    @(negedge clk);
    check(halted, $sformatf("string %b: halted not raised 2N-2 clocks after reject/all_done", ws));
    // the wave passes the Q-array up to N clocks after P(1,1)
    repeat (N) @(negedge clk);
    snap = tree;
    repeat (6 * N) begin
      @(negedge clk);
      check(!tree_valid && tree == snap, $sformatf("string %b: array still active after halted", ws));
    end
    if (halted) n_stop++;
  endtask

  // ------------------------------------------------------ stimulus
  initial begin
    sym_in = '0;
    for (int s = 0; s < (1 << N); s++) begin
      longint expect_trees;
      bit     want_accept;
      for (int i = 1; i <= N; i++) w[i] = s[N-i];
      build_ref();
      expect_trees = cnt[START_SYMBOL][1][N];
      want_accept  = lhs_in(R[1][N], START_SYMBOL);
      ntree_str = 0;
      rst = 1'b1;
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst = 1'b0;
      // symbols a_1..a_N then $
      for (int c = 1; c <= N + 1; c++) begin
        sym_in.valid = 1'b1;
        sym_in.eoi   = (c == N + 1);
        sym_in.term  = (c <= N) ? w[c] : 1'b0;
        @(negedge clk);
      end
      sym_in = '0;
      // wait for the result
      while (!accept && !reject && cyc < 10 * N) @(negedge clk);
      check(accept == want_accept && reject == !want_accept,
            $sformatf("string %b: accept=%0b reject=%0b, expected accept=%0b", w, accept, reject, want_accept));
      check(cyc == 3 * N - 1, $sformatf("string %b: decided in clock %0d, expected %0d", w, cyc, 3 * N - 1));
      if (want_accept) n_accept++; else n_reject++;
      if (!accept) wait_stop(w);
      if (accept) begin
        last_tv = -1;
        while (!all_done && cyc < 3 * N + (expect_trees + 2) * (6 * N - 3) + 20) begin
          @(negedge clk);
        end
        check(all_done, $sformatf("string %b: all_done never raised", w));
        if (all_done) n_done++;
        if (all_done) wait_stop(w);
        check(longint'(ntree_str) == expect_trees,
              $sformatf("string %b: %0d trees output, %0d expected", w, ntree_str, expect_trees));
      end
    end
    $display("mechanisms: accepted=%0d rejected=%0d trees=%0d subtree_steps=%0d split_steps=%0d production_steps=%0d all_done=%0d stop_waves=%0d",
             n_accept, n_reject, n_trees, n_sub, n_split, n_prod, n_done, n_stop);
    check(n_accept > 0, "no string accepted");
    check(n_reject > 0, "no string rejected");
    check(n_sub > 0, "no stage changed only a subtree");
    check(n_split > 0, "no stage advanced the split point of the root");
    check(n_prod > 0, "no stage advanced the root production");
    check(n_done > 0, "last-tree detection never happened");
    check(n_stop == n_accept + n_reject, "a stop wave did not reach P(1,1) for every string");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock count since the first symbol, recognition-matrix and tree monitors
  always @(posedge clk) begin
    if (rst) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      // cyc+1 is the clock that ends at this edge
      for (int j = 1; j <= N; j++) begin
        int s;
        s = int'(cyc) - 2 * j + 2;            // sweep whose entry is visible now
        if (s >= j && s <= N)
          check(prim_entry[j] == R[s-j+1][s],
                $sformatf("string %b: P(%0d,%0d) holds %b at sweep %0d, expected R(%0d,%0d)=%b",
                          w, j, j, prim_entry[j], s, s - j + 1, s, R[s-j+1][s]));
      end
      if (tree_valid) begin
        if (ntree_str > 0)
          check(cyc - last_tv == 6 * N - 3,
                $sformatf("string %b: stages %0d clocks apart, expected %0d", w, cyc - last_tv, 6 * N - 3));
        last_tv = cyc;
                check_tree();
        ntree_str++;
        n_trees++;
      end
    end
  end

endmodule

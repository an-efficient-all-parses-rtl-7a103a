// tb_q_array: the Q-array on its own (N = 4). The testbench plays the part of
// the P-array for one stage: it sends the begin-parse and end-parse waves
// into each row and, at the reverse sweep where the P-array would, the MATCH
// results of the first parse tree of "abaa" (S->AA at R(1,4), A->AC at
// R(1,3), A->CB at R(1,2), leaves C->a, B->b, C->a, A->a). Taking clock 0 as
// reverse sweep 1 of P(N,N), row j receives begin-parse in clock 2N-j,
// end-parse in clock 3N-2j, and the record of entry R(a,b) in clock
// 3N-j-b (j = b-a+1). Checks:
//   * tree_valid in clock 6N-4 only, with every record in place and the
//     flags of the update step: R(1,4) ldone=0 done=0 rdone=1, R(1,3)
//     1 0 1, R(1,2) 1 1 1, leaves 1 1 1, empty entries 0 0 0;
//   * next_stage in clock 6N-3, and the unload stream: primary P(r,r)
//     receives the record of R(N-r-k+2, N-k+1) in clock 6N-3 + 2(N-r) + k-1.
module tb_q_array;
  import cfl_pkg::*;

  localparam int N = 4;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  match_t m_right  [1:N];
  logic   bp_right [1:N];
  logic   ep_right [1:N];
  qreg_t  q_prim   [1:N];
  logic   next_stage, tree_valid;
  qreg_t  tree     [1:N][1:N];

  logic stop_right [1:N];
  always_comb for (int j = 1; j <= N; j++) stop_right[j] = 1'b0;
  q_array #(.N(N)) dut (.clk, .rst, .m_right, .bp_right, .ep_right, .stop_right, .q_prim, .next_stage, .tree_valid, .tree);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the stage-1 tree: production, distinguished, l, b, last_id
  match_t node [1:N][1:N];
  logic [2:0] flags [1:N][1:N];     // expected {ldone, done, rdone}

  function automatic match_t mk(int prod, bit dg, int l, bit b, bit last);
    match_t m = '0;
    m.valid = 1'b1; m.prod = prod_t'(prod); m.distg = dg;
    m.l = pos_t'(l); m.b = b; m.last_id = last;
    return m;
  endfunction

  int cyc = 0;
  int n_tv = 0, n_ns = 0;

  initial begin
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        node[i][j]  = '0;
        flags[i][j] = 3'b000;
      end
    node[1][4] = mk(0, 0, 3, 1, 0);  flags[1][4] = 3'b001;
    node[1][3] = mk(2, 0, 2, 1, 1);  flags[1][3] = 3'b101;
    node[1][2] = mk(3, 1, 1, 0, 1);  flags[1][2] = 3'b111;
    node[1][1] = mk(8, 1, 0, 0, 1);  flags[1][1] = 3'b111;
    node[2][2] = mk(7, 1, 0, 0, 1);  flags[2][2] = 3'b111;
    node[3][3] = mk(8, 1, 0, 0, 1);  flags[3][3] = 3'b111;
    node[4][4] = mk(6, 1, 0, 0, 1);  flags[4][4] = 3'b111;
    for (int j = 1; j <= N; j++) begin
      m_right[j] = '0; bp_right[j] = 0; ep_right[j] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // drive one clock ahead: values set at this negedge are seen in clock cyc
    for (int c = 0; c < 12 * N; c++) begin
      for (int j = 1; j <= N; j++) begin
        bp_right[j] = (c == 2 * N - j);
        ep_right[j] = (c == 3 * N - 2 * j);
        m_right[j]  = '0;
        for (int b = j; b <= N; b++)
          if (c == 3 * N - j - b) m_right[j] = node[b-j+1][b];
      end
      @(negedge clk);
    end
    check(n_tv == 1, $sformatf("tree_valid seen %0d times, expected once", n_tv));
    check(n_ns == 1, $sformatf("next_stage seen %0d times, expected once", n_ns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (tree_valid) begin
        n_tv++;
        check(cyc == 6 * N - 4, $sformatf("tree_valid in clock %0d, expected %0d", cyc, 6 * N - 4));
        for (int j = 1; j <= N; j++)
          for (int i = 1; i <= j; i++) begin
            qreg_t  e;
            match_t m;
            e = tree[i][j];
            m = node[i][j];
            check(e.pvalid == m.valid && (!m.valid || (e.prod == m.prod && e.distg == m.distg &&
                  e.l == m.l && e.b == m.b && e.last_id == m.last_id)),
                  $sformatf("Q(%0d,%0d): record wrong", i, j));
            check({e.ldone, e.done, e.rdone} == flags[i][j],
                  $sformatf("Q(%0d,%0d): flags %b%b%b, expected %b", i, j, e.ldone, e.done, e.rdone, flags[i][j]));
          end
      end
      if (next_stage) begin
        n_ns++;
        check(cyc == 6 * N - 3, $sformatf("next_stage in clock %0d, expected %0d", cyc, 6 * N - 3));
      end
      for (int r = 1; r <= N; r++)
        for (int k = 1; k <= N - r + 1; k++)
          if (cyc == 6 * N - 3 + 2 * (N - r) + k - 1) begin
            match_t m;
            m = node[N-r-k+2][N-k+1];
            check(q_prim[r].pvalid == m.valid && (!m.valid || q_prim[r].prod == m.prod) &&
                  q_prim[r].done == flags[N-r-k+2][N-k+1][1],
                  $sformatf("P(%0d,%0d) reverse sweep %0d: record of R(%0d,%0d) expected", r, r, k, N-r-k+2, N-k+1));
          end
    end
  end

endmodule

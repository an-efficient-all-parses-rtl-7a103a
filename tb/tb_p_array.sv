// tb_p_array: the P-array on its own (N = 5), Q-array links left open.
// For random strings over {a,b} of length N (and a few fixed ones), checks
// against a CKY reference worked out here from the grammar tables:
//   * every primary P(j,j) holds R(s-j+1,s) after forward sweep s
//     (visible from clock 2j-1+s), for all j <= s <= N;
//   * accept/reject, decided in clock 3N-1; after a reject, the stop wave
//     reaching P(1,1) 2N-2 clocks later;
//   * for an accepted string, stage 1 of parse generation: exactly 2N-1
//     MATCH instructions (one per tree node) leave the left column, the
//     one from row j at reverse sweep r names a production of
//     R(N-r-j+2, N-r+1), and row N's one (the root) has the start symbol.
module tb_p_array;
  import cfl_pkg::*;

  localparam int N = 5;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  sym_in_t sym_in;
  logic    accept, reject, all_done, halted;
  logic    stop_left [1:N];
  pset_t   prim_entry [1:N];
  match_t  m_left  [1:N];
  logic    bp_left [1:N];
  logic    ep_left [1:N];
  qreg_t   q_prim  [1:N];

  for (genvar j = 1; j <= N; j++) begin : g_q
    assign q_prim[j] = '0;
  end

  p_array #(.N(N)) dut (
    .clk, .rst, .sym_in, .accept, .reject, .all_done, .prim_entry,
    .m_left, .bp_left, .ep_left, .stop_left, .halted, .q_prim, .next_stage(1'b0)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N:1]       w;
  logic [NPROD-1:0] R [1:N][1:N];

  function automatic logic lhs_in(logic [NPROD-1:0] s, nt_t a);
    for (int k = 0; k < NPROD; k++)
      if (s[k] && PROD_LHS[k] == a) return 1'b1;
    return 1'b0;
  endfunction

  task automatic build_ref();
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) R[i][j] = '0;
    for (int i = 1; i <= N; i++)
      for (int k = 0; k < NPROD; k++)
        if (!PROD_BIN[k] && PROD_TERM[k] == w[i]) R[i][i][k] = 1'b1;
    for (int len = 2; len <= N; len++)
      for (int i = 1; i + len - 1 <= N; i++)
        for (int k = 0; k < NPROD; k++)
          if (PROD_BIN[k])
            for (int c = i; c < i + len - 1; c++)
              if (lhs_in(R[i][c], PROD_RHS1[k]) && lhs_in(R[c+1][i+len-1], PROD_RHS2[k]))
                R[i][i+len-1][k] = 1'b1;
  endtask

  longint cyc;
  longint t_stage;
  int     n_match;

  initial begin
    sym_in = '0;
    for (int t = 0; t < 40; t++) begin
      bit want;
      if (t == 0)      w = '0;                          // aaaaa
      else if (t == 1) w = '1;                          // bbbbb
      else             w = N'($urandom);
      build_ref();
      want = lhs_in(R[1][N], START_SYMBOL);
      rst = 1'b1;
      repeat (2) @(posedge clk);
      @(negedge clk);
      rst = 1'b0;
      n_match = 0;
      for (int c = 1; c <= N + 1; c++) begin
        sym_in.valid = 1'b1;
        sym_in.eoi   = (c == N + 1);
        sym_in.term  = (c <= N) ? w[c] : 1'b0;
        @(negedge clk);
      end
      sym_in = '0;
      while (!accept && !reject && cyc < 10 * N) @(negedge clk);
      check(accept == want && reject == !want, $sformatf("string %b: accept=%0b expected %0b", w, accept, want));
      check(cyc == 3 * N - 1, $sformatf("string %b: decided in clock %0d, expected %0d", w, cyc, 3 * N - 1));
      if (want) n_acc++; else n_rej++;
      // a reject sends the stop wave back to P(1,1): 2N-2 clocks
      if (!want) begin
        check(!halted, $sformatf("string %b: halted too early", w));
        repeat (2 * N - 3) @(negedge clk);
        check(!halted, $sformatf("string %b: halted before 2N-2 clocks", w));
        @(negedge clk);
        check(halted && stop_left[1], $sformatf("string %b: stop wave not at P(1,1) 2N-2 clocks after reject", w));
      end
      // stage 1 of parse generation runs 4N-3 clocks in the P-array
      repeat (6 * N) @(negedge clk);
      if (want)
        check(n_match == 2 * N - 1, $sformatf("string %b: %0d MATCH instructions left the array in stage 1, expected %0d",
                                              w, n_match, 2 * N - 1));
    end
    check(n_acc > 0 && n_rej > 0, "both accepted and rejected strings seen");
    $display("accepted=%0d rejected=%0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      for (int j = 1; j <= N; j++) begin
        int s;
        s = int'(cyc) - 2 * j + 2;
        if (s >= j && s <= N)
          check(prim_entry[j] == R[s-j+1][s],
                $sformatf("string %b: P(%0d,%0d) sweep %0d holds %b, expected %b", w, j, j, s, prim_entry[j], R[s-j+1][s]));
      end
      // stage 1 starts at clock 3N-1 at P(N,N); P(1,j) runs reverse sweep r
      // at clock 3N-1 + (N-1) + (N-j) + r-1, its MATCH is visible one later
      for (int j = 1; j <= N; j++) begin
        if (m_left[j].valid) begin
          int r, b, a;
          r = int'(cyc) - (3 * N - 1) - (N - 1) - (N - j) + 1;
          b = N - r + 1;
          a = b - j + 1;
          n_match++;
          if (a >= 1 && b <= N && r >= 1)
            check(int'(m_left[j].prod) < NPROD && R[a][b][m_left[j].prod],
                  $sformatf("string %b: MATCH from row %0d names production %0d not in R(%0d,%0d)", w, j, m_left[j].prod, a, b));
          else
            check(0, $sformatf("string %b: MATCH from row %0d at unexpected clock %0d", w, j, cyc));
          if (j == N)
            check(PROD_LHS[m_left[j].prod] == START_SYMBOL, "root MATCH has the start symbol");
        end
      end
    end
  end

endmodule

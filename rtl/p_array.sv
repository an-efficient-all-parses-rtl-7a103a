// p_array: the triangular P-array, processors P(i,j) for 1 <= i <= j <= N
// (column i from the left, row j from the top), with every link between them.
//
// Forward links (recognition), delays in clocks:
//   OUT00 of P(i-1,j-1) -> IN00 of P(i,j)   3
//   OUT11 of P(i-1,j-1) -> IN11 of P(i,j)   2
//   OUT01 of P(i,j-1)   -> IN01 of P(i,j)   1
//   OUT10 of P(i,j-1)   -> IN10 of P(i,j)   2
//   OUT_v of P(i-1,j)   -> IN_v of P(i,j)   1   (IN_v of column 1 is empty)
// Missing neighbours give empty sets. Forward sweep s reaches P(i,j) at clock
// s + (i-1) + (j-1); one input symbol enters P(1,1) per clock, then $.
// The start wave leaves P(1,1) with the first symbol and moves right 1 clock
// and down 2 clocks per hop (it reaches P(i,j) at forward sweep j); the halt
// wave leaves P(1,1) with $ and moves right and down 1 clock per hop (sweep
// N+1). P(N,N) reports accept/reject in the clock after the halt reaches it,
// clock 3N-1 counting the first symbol as clock 1.
//
// Reverse links (parse generation) carry cells back along each forward link
// with the same delay. The begin-parse wave leaves P(N,N) and moves left
// 1 clock and up 1 clock per hop; the end-parse wave moves left 1 clock and
// up 2 clocks (it reaches row j at reverse sweep N-j+1). MATCH instructions
// move left 1 clock per hop; those leaving column 1, and the two waves,
// go on into the Q-array (m_left, bp_left, ep_left). Each primary P(j,j)
// receives its record I from the left end of row j of the Q-array (q_prim).
// The stop wave (after a reject, or after the last parse tree) leaves P(N,N)
// over the begin-parse routes; halted rises when it has reached P(1,1), 2N-2
// clocks later, and it goes on into the Q-array (stop_left).
module p_array
  import cfl_pkg::*;
#(
  parameter int N = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  sym_in_t sym_in,
  output logic    accept,
  output logic    reject,
  output logic    all_done,
  output pset_t   prim_entry [1:N],   // r01 of each primary P(j,j)
  output match_t  m_left     [1:N],   // MATCH leaving P(1,j)
  output logic    bp_left    [1:N],
  output logic    ep_left    [1:N],
  output logic    stop_left  [1:N],   // stop wave leaving P(1,j)
  output logic    halted,             // the stop wave has reached P(1,1)
  input  qreg_t   q_prim     [1:N],   // record I for P(j,j)
  input  logic    next_stage          // record I for P(N,N) present
);

  localparam int PW = $bits(pset_t);
  localparam int CW = $bits(cell_t);

  // per-processor signals, index [i][j]
  pset_t       v_out  [1:N][1:N];
  pset_t       v_in   [1:N][1:N];
  pset_t [3:0] fin    [1:N][1:N];
  pset_t [3:0] fout   [1:N][1:N];
  cell_t [3:0] bin    [1:N][1:N];
  cell_t [3:0] bout   [1:N][1:N];
  match_t      m_in   [1:N][1:N];
  match_t      m_out  [1:N][1:N];
  logic        start_in [1:N][1:N], start_out [1:N][1:N];
  logic        halt_in  [1:N][1:N], halt_out  [1:N][1:N];
  logic        bp_in    [1:N][1:N], bp_out    [1:N][1:N];
  logic        ep_in    [1:N][1:N], ep_out    [1:N][1:N];
  logic        stop_in  [1:N][1:N], stop_out  [1:N][1:N];
  logic        acc      [1:N][1:N], rej       [1:N][1:N], fin_all [1:N][1:N];
  logic        hlt      [1:N][1:N];

  for (genvar j = 1; j <= N; j++) begin : g_row
    for (genvar i = 1; i <= N; i++) begin : g_col
      if (i <= j) begin : g_p
        // ---------------------------------------------- forward inputs
        if (i > 1 && j > 1) begin : g_diag_in
          link_delay #(.W(PW), .D(2)) u_d00 (.clk, .rst, .d(fout[i-1][j-1][0]), .q(fin[i][j][0]));
          link_delay #(.W(PW), .D(1)) u_d11 (.clk, .rst, .d(fout[i-1][j-1][3]), .q(fin[i][j][3]));
        end else begin : g_no_diag_in
          assign fin[i][j][0] = '0;
          assign fin[i][j][3] = '0;
        end
        if (i < j) begin : g_vert_in
          assign fin[i][j][1] = fout[i][j-1][1];
          link_delay #(.W(PW), .D(1)) u_d10 (.clk, .rst, .d(fout[i][j-1][2]), .q(fin[i][j][2]));
        end else begin : g_no_vert_in
          assign fin[i][j][1] = '0;
          assign fin[i][j][2] = '0;
        end
        if (i > 1) begin : g_h_in
          assign v_in[i][j]     = v_out[i-1][j];
          assign start_in[i][j] = start_out[i-1][j];
          assign halt_in[i][j]  = halt_out[i-1][j];
        end else if (j > 1) begin : g_c1_in
          assign v_in[i][j] = '0;
          link_delay #(.W(1), .D(1)) u_start (.clk, .rst, .d(start_out[1][j-1]), .q(start_in[i][j]));
          assign halt_in[i][j] = halt_out[1][j-1];
        end else begin : g_origin_in
          assign v_in[i][j]     = '0;
          assign start_in[i][j] = 1'b0;
          assign halt_in[i][j]  = 1'b0;
        end
        // ---------------------------------------------- reverse inputs
        if (j < N) begin : g_back_in
          link_delay #(.W(CW), .D(2)) u_b00 (.clk, .rst, .d(bout[i+1][j+1][0]), .q(bin[i][j][0]));
          assign bin[i][j][1] = bout[i][j+1][1];
          link_delay #(.W(CW), .D(1)) u_b10 (.clk, .rst, .d(bout[i][j+1][2]), .q(bin[i][j][2]));
          link_delay #(.W(CW), .D(1)) u_b11 (.clk, .rst, .d(bout[i+1][j+1][3]), .q(bin[i][j][3]));
        end else begin : g_no_back_in
          assign bin[i][j] = '0;
        end
        if (i < j) begin : g_sec_rev
          assign m_in[i][j]  = m_out[i+1][j];
          assign bp_in[i][j] = bp_out[i+1][j];
          assign ep_in[i][j] = ep_out[i+1][j];
          assign stop_in[i][j] = stop_out[i+1][j];
        end else if (j < N) begin : g_prim_rev
          assign m_in[i][j]  = '0;
          assign bp_in[i][j] = bp_out[j][j+1];
          assign stop_in[i][j] = stop_out[j][j+1];
          link_delay #(.W(1), .D(1)) u_ep (.clk, .rst, .d(ep_out[j][j+1]), .q(ep_in[i][j]));
        end else begin : g_last_rev
          assign m_in[i][j]  = '0;
          assign bp_in[i][j] = 1'b0;
          assign ep_in[i][j] = 1'b0;
          assign stop_in[i][j] = 1'b0;
        end

        p_proc #(.N(N), .I(i), .J(j)) u_p (
          .clk, .rst,
          .sym_in     (sym_in),
          .v_in       (v_in[i][j]),
          .v_out      (v_out[i][j]),
          .fin        (fin[i][j]),
          .fout       (fout[i][j]),
          .start_in   (start_in[i][j]),
          .start_out  (start_out[i][j]),
          .halt_in    (halt_in[i][j]),
          .halt_out   (halt_out[i][j]),
          .accept     (acc[i][j]),
          .reject     (rej[i][j]),
          .bin        (bin[i][j]),
          .bout       (bout[i][j]),
          .m_in       (m_in[i][j]),
          .m_out      (m_out[i][j]),
          .bp_in      (bp_in[i][j]),
          .bp_out     (bp_out[i][j]),
          .ep_in      (ep_in[i][j]),
          .ep_out     (ep_out[i][j]),
          .q_in       (i == j ? q_prim[j] : '0),
          .next_stage (i == N && j == N ? next_stage : 1'b0),
          .all_done   (fin_all[i][j]),
          .stop_in    (stop_in[i][j]),
          .stop_out   (stop_out[i][j]),
          .halted     (hlt[i][j])
        );
      end else begin : g_none
        assign v_out[i][j]     = '0;
        assign fout[i][j]      = '0;
        assign bout[i][j]      = '0;
        assign m_out[i][j]     = '0;
        assign start_out[i][j] = 1'b0;
        assign halt_out[i][j]  = 1'b0;
        assign bp_out[i][j]    = 1'b0;
        assign ep_out[i][j]    = 1'b0;
        assign acc[i][j]       = 1'b0;
        assign rej[i][j]       = 1'b0;
        assign fin_all[i][j]   = 1'b0;
        assign stop_in[i][j]   = 1'b0;
        assign stop_out[i][j]  = 1'b0;
        assign hlt[i][j]       = 1'b0;
        assign v_in[i][j]      = '0;
        assign fin[i][j]       = '0;
        assign bin[i][j]       = '0;
        assign m_in[i][j]      = '0;
        assign start_in[i][j]  = 1'b0;
        assign halt_in[i][j]   = 1'b0;
        assign bp_in[i][j]     = 1'b0;
        assign ep_in[i][j]     = 1'b0;
      end
    end
    assign prim_entry[j] = fout[j][j][1];
    assign m_left[j]     = m_out[1][j];
    assign bp_left[j]    = bp_out[1][j];
    assign ep_left[j]    = ep_out[1][j];
    assign stop_left[j]  = stop_out[1][j];
  end

  assign accept   = acc[N][N];
  assign reject   = rej[N][N];
  assign all_done = fin_all[N][N];
  assign halted   = hlt[1][1];

endmodule

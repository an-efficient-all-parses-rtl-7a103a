// q_array: the triangular Q-array, processors Q(i,j) for 1 <= i <= j <= N.
// Q(i,j) sits in the i-th column from the right and row j-i+1 from the top,
// so row r holds Q(1,r) (rightmost) .. Q(N-r+1,N) (leftmost), and at the end
// of a stage Q(i,j) holds the production of the parse tree taken from R(i,j).
//
// Links and waves, delays in clocks:
//   * row shift, right to left, 1 per hop: Q(i-1,j-1) -> Q(i,j); the
//     rightmost Q(1,j) is fed by the MATCH leaving P(1,j) (m_right); the
//     leftmost Q(N-r+1,N) feeds primary P(r,r) (q_prim, toroidal link);
//   * begin-parse / end-parse continue from P(1,j) along row j, 1 per hop;
//   * update wave: starts at Q(N,N) when end-parse reaches it (reverse sweep
//     N), moves right along the top row 1 per hop and diagonally down
//     (Q(i+1,j) -> Q(i,j)) 2 per hop; done values move down vertically
//     (Q(i,j-1) -> Q(i,j), 1 clock) and diagonally (2 clocks) with it;
//   * unload wave: starts at Q(1,N) the clock after its update and moves up
//     the right column and left along every row, 1 per hop. In the clock after
//     it starts, Q(1,N) presents its record to P(N,N) (next_stage), which
//     starts the next stage: 6N-3 clocks after the previous one.
//   * stop wave: continues from P(1,j) along row j, 1 per hop; a processor
//     it has passed stops shifting for good.
// tree_valid is high for the one clock in which every Q register holds the
// finished tree and its updated flags (tree).
module q_array
  import cfl_pkg::*;
#(
  parameter int N = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  match_t m_right    [1:N],   // MATCH leaving P(1,j)
  input  logic   bp_right   [1:N],
  input  logic   ep_right   [1:N],
  input  logic   stop_right [1:N],   // stop wave leaving P(1,j)
  output qreg_t  q_prim     [1:N],   // record for primary P(r,r)
  output logic   next_stage,
  output logic   tree_valid,
  output qreg_t  tree       [1:N][1:N]
);

  qreg_t sh_in  [1:N][1:N], sh_out [1:N][1:N];
  logic  bp_in  [1:N][1:N], bp_out [1:N][1:N];
  logic  ep_in  [1:N][1:N], ep_out [1:N][1:N];
  logic  ul_in  [1:N][1:N], ul_out [1:N][1:N];
  logic  upd_in [1:N][1:N], upd_out[1:N][1:N];
  logic  dv_in  [1:N][1:N], dv_out [1:N][1:N];
  logic  dd_in  [1:N][1:N], dd_out [1:N][1:N];
  logic  st_in  [1:N][1:N], st_out [1:N][1:N];

  for (genvar j = 1; j <= N; j++) begin : g_row
    for (genvar i = 1; i <= N; i++) begin : g_col
      if (i <= j) begin : g_q
        if (i == 1) begin : g_right
          always_comb begin
            sh_in[i][j]         = '0;
            sh_in[i][j].pvalid  = m_right[j].valid;
            sh_in[i][j].prod    = m_right[j].prod;
            sh_in[i][j].distg    = m_right[j].distg;
            sh_in[i][j].l       = m_right[j].l;
            sh_in[i][j].b       = m_right[j].b;
            sh_in[i][j].last_id = m_right[j].last_id;
            if (!m_right[j].valid) sh_in[i][j] = '0;
          end
          assign bp_in[i][j] = bp_right[j];
          assign ep_in[i][j] = ep_right[j];
          assign st_in[i][j] = stop_right[j];
          if (j == N) begin : g_ul_origin
            assign ul_in[i][j] = upd_out[1][N];
          end else begin : g_ul_up
            assign ul_in[i][j] = ul_out[1][j+1];
          end
        end else begin : g_inner
          assign sh_in[i][j] = sh_out[i-1][j-1];
          assign bp_in[i][j] = bp_out[i-1][j-1];
          assign ep_in[i][j] = ep_out[i-1][j-1];
          assign st_in[i][j] = st_out[i-1][j-1];
          assign ul_in[i][j] = ul_out[i-1][j-1];
        end
        if (i == j) begin : g_top
          if (j == N) begin : g_upd_origin
            assign upd_in[i][j] = ep_in[N][N];
          end else begin : g_upd_right
            assign upd_in[i][j] = upd_out[j+1][j+1];
          end
          assign dv_in[i][j] = 1'b0;
          assign dd_in[i][j] = 1'b0;
        end else begin : g_lower
          link_delay #(.W(1), .D(1)) u_upd (.clk, .rst, .d(upd_out[i+1][j]), .q(upd_in[i][j]));
          link_delay #(.W(1), .D(1)) u_dd  (.clk, .rst, .d(dd_out[i+1][j]),  .q(dd_in[i][j]));
          assign dv_in[i][j] = dv_out[i][j-1];
        end

        q_proc #(.I(i), .J(j)) u_q (
          .clk, .rst,
          .sh_in   (sh_in[i][j]),
          .sh_out  (sh_out[i][j]),
          .bp_in   (bp_in[i][j]),
          .bp_out  (bp_out[i][j]),
          .ep_in   (ep_in[i][j]),
          .ep_out  (ep_out[i][j]),
          .ul_in   (ul_in[i][j]),
          .ul_out  (ul_out[i][j]),
          .upd_in  (upd_in[i][j]),
          .upd_out (upd_out[i][j]),
          .dv_in   (dv_in[i][j]),
          .dd_in   (dd_in[i][j]),
          .dv_out  (dv_out[i][j]),
          .dd_out  (dd_out[i][j]),
          .stop_in (st_in[i][j]),
          .stop_out(st_out[i][j]),
          .q       (tree[i][j])
        );
      end else begin : g_none
        assign sh_in[i][j]   = '0;
        assign sh_out[i][j]  = '0;
        assign bp_in[i][j]   = 1'b0;
        assign bp_out[i][j]  = 1'b0;
        assign ep_in[i][j]   = 1'b0;
        assign ep_out[i][j]  = 1'b0;
        assign ul_in[i][j]   = 1'b0;
        assign ul_out[i][j]  = 1'b0;
        assign upd_in[i][j]  = 1'b0;
        assign upd_out[i][j] = 1'b0;
        assign dv_in[i][j]   = 1'b0;
        assign dv_out[i][j]  = 1'b0;
        assign dd_in[i][j]   = 1'b0;
        assign dd_out[i][j]  = 1'b0;
        assign st_in[i][j]   = 1'b0;
        assign st_out[i][j]  = 1'b0;
        assign tree[i][j]    = '0;
      end
    end
    assign q_prim[j] = sh_out[N-j+1][N];
  end

  assign next_stage = ul_out[1][N];
  assign tree_valid = upd_out[1][N];

endmodule

// q_proc: one processor Q(I,J) of the triangular Q-array (I-th column from
// the right, row J-I+1 from the top). At the end of a stage it holds the
// production of the current parse tree that belongs to recognition-matrix
// entry R(I,J), if any, with the bookkeeping needed to build the next tree.
//
// Registers (record qreg_t): p (a production, with its "distinguished" bit
// meaning "last production with this left side in the entry"), id = (l,b),
// last_id, and the update flags ldone, done, rdone.
//
// Four activities, each started by a wave that reaches the processor:
//   * Load (from begin-parse to end-parse, one shift per reverse sweep): the
//     record moves one place left along the row and the record of the right
//     neighbour moves in. The rightmost processor of a row takes p, id and
//     last_id from the MATCH leaving the leftmost P-processor of the same
//     row, or an empty record when there is none. Each shift writes the old
//     record to the outgoing register sh_out before taking the new one, so a
//     record advances exactly one place per sweep although the left
//     neighbour runs one clock later.
//   * Update (update wave): a top-row processor (a leaf, I = J) sets
//     ldone = done = rdone = 1 and sends 1 down both ways. Below the top row,
//     a processor without a production passes its vertical input (from
//     Q(I,J-1), 1 clock) and diagonal input (from Q(I+1,J), 2 clocks) straight
//     on; one with a production sets ldone from the vertical input, rdone
//     from the diagonal one, and done = ldone & rdone & last_id &
//     distinguished, and sends done both ways.
//   * Unload (unload wave, until the next begin-parse): the same shift as
//     Load, so that every row of the finished tree streams out of its left
//     end into the primary P-processor of that row (toroidal links).
//   * Stop (stop wave from the P-array, after a reject or after the last
//     tree): the processor stops shifting for good and keeps its record.
// The update and unload waves are generated by the array, the stop wave by
// the P-array.
//
// Own choices: the shift during unload simply continues until the next
// begin-parse or the stop wave arrives (empty records are shifted in
// meanwhile). After the last tree the stop wave reaches each processor N+1
// clocks after the unload wave, so the whole tree has left the row by then.
module q_proc
  import cfl_pkg::*;
#(
  parameter int I = 1,
  parameter int J = 1
) (
  input  logic   clk,
  input  logic   rst,
  input  qreg_t  sh_in,      // record from the right neighbour (or the P-array)
  output qreg_t  sh_out,     // record to the left neighbour
  input  logic   bp_in,      // begin-parse wave
  output logic   bp_out,
  input  logic   ep_in,      // end-parse wave
  output logic   ep_out,
  input  logic   ul_in,      // unload wave
  output logic   ul_out,
  input  logic   upd_in,     // update wave
  output logic   upd_out,    // 1-clock copy (right on the top row, diagonal below)
  input  logic   dv_in,      // done from above (vertical)
  input  logic   dd_in,      // done from the upper-left (diagonal)
  output logic   dv_out,
  output logic   dd_out,
  input  logic   stop_in,    // stop wave from the P-array
  output logic   stop_out,
  output qreg_t  q           // current record
);

  localparam bit TOP = (I == J);

  logic load_active, unload_active, halted, shift;

  assign shift = (load_active || bp_in || unload_active || ul_in) && !halted && !stop_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      q             <= '0;
      sh_out        <= '0;
      load_active   <= 1'b0;
      unload_active <= 1'b0;
      bp_out        <= 1'b0;
      ep_out        <= 1'b0;
      ul_out        <= 1'b0;
      upd_out       <= 1'b0;
      dv_out        <= 1'b0;
      dd_out        <= 1'b0;
      halted        <= 1'b0;
      stop_out      <= 1'b0;
    end else begin
      stop_out <= stop_in;
      if (stop_in) halted <= 1'b1;
      bp_out  <= bp_in;
      ep_out  <= ep_in;
      ul_out  <= ul_in;
      upd_out <= upd_in;

      if (ep_in || stop_in) load_active <= 1'b0;
      else if (bp_in)       load_active <= 1'b1;
      if (bp_in || stop_in) unload_active <= 1'b0;
      else if (ul_in)       unload_active <= 1'b1;

      if (shift) begin
        sh_out <= q;
        q      <= sh_in;
      end

      if (upd_in) begin
        if (TOP) begin
          q.ldone <= 1'b1;
          q.done  <= 1'b1;
          q.rdone <= 1'b1;
          dv_out  <= 1'b1;
          dd_out  <= 1'b1;
        end else if (!q.pvalid) begin
          q.ldone <= 1'b0;
          q.done  <= 1'b0;
          q.rdone <= 1'b0;
          dv_out  <= dv_in;
          dd_out  <= dd_in;
        end else begin
          q.ldone <= dv_in;
          q.rdone <= dd_in;
          q.done  <= dv_in && dd_in && q.last_id && q.distg;
          dv_out  <= dv_in && dd_in && q.last_id && q.distg;
          dd_out  <= dv_in && dd_in && q.last_id && q.distg;
        end
      end
    end
  end

endmodule

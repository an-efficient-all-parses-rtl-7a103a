// tb_q_proc: unit test of the Q-processor, one top-row instance (Q(2,2),
// a leaf) and one lower instance (Q(1,3)).
// Checks, against values worked out here:
//   * load: from begin-parse to end-parse the record shifts in from sh_in
//     each clock and the previous record leaves on sh_out one clock later;
//     after end-parse the record holds still;
//   * update, lower row: with a production, ldone/rdone take the vertical /
//     diagonal inputs and done = ldone & rdone & last_id & distinguished,
//     sent on both outputs; without one, the flags clear and the inputs pass
//     straight through; all 16 input/flag combinations;
//   * update, top row: all three flags set and 1 sent both ways;
//   * unload: shifting restarts on the unload wave and stops at the next
//     begin-parse;
//   * stop: the stop wave is passed on and ends all shifting for good.
module tb_q_proc;
  import cfl_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  always #5 clk = ~clk;

  qreg_t sh_in, sh_out_t, sh_out_l, q_t, q_l;
  logic  bp, ep, ul, upd, dv, dd, stp;
  logic  st_o_t, st_o_l;
  logic  bp_o_t, ep_o_t, ul_o_t, upd_o_t, dv_o_t, dd_o_t;
  logic  bp_o_l, ep_o_l, ul_o_l, upd_o_l, dv_o_l, dd_o_l;

  q_proc #(.I(2), .J(2)) u_top (
    .clk, .rst, .sh_in, .sh_out(sh_out_t), .bp_in(bp), .bp_out(bp_o_t), .ep_in(ep), .ep_out(ep_o_t),
    .ul_in(ul), .ul_out(ul_o_t), .upd_in(upd), .upd_out(upd_o_t), .dv_in(dv), .dd_in(dd),
    .dv_out(dv_o_t), .dd_out(dd_o_t), .stop_in(stp), .stop_out(st_o_t), .q(q_t));
  q_proc #(.I(1), .J(3)) u_low (
    .clk, .rst, .sh_in, .sh_out(sh_out_l), .bp_in(bp), .bp_out(bp_o_l), .ep_in(ep), .ep_out(ep_o_l),
    .ul_in(ul), .ul_out(ul_o_l), .upd_in(upd), .upd_out(upd_o_l), .dv_in(dv), .dd_in(dd),
    .dv_out(dv_o_l), .dd_out(dd_o_l), .stop_in(stp), .stop_out(st_o_l), .q(q_l));

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

  function automatic qreg_t rnd_rec();
    qreg_t r;
    r = qreg_t'({$urandom, $urandom});
    r.ldone = 1'b0; r.done = 1'b0; r.rdone = 1'b0;
    return r;
  endfunction

  qreg_t recs [8];
  qreg_t held;

  initial begin
    {bp, ep, ul, upd, dv, dd, stp} = '0;
    sh_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // ---------------- load: bp on clock 0, ep on clock 3 (4 shifts)
    for (int k = 0; k < 8; k++) recs[k] = rnd_rec();
    for (int k = 0; k < 6; k++) begin
      bp    = (k == 0);
      ep    = (k == 3);
      sh_in = recs[k];
      @(negedge clk);
      if (k <= 3) begin
        check(q_l == recs[k], $sformatf("load shift %0d: record not taken", k));
        if (k >= 1) check(sh_out_l == recs[k-1], $sformatf("load shift %0d: old record not passed on", k));
      end else begin
        check(q_l == recs[3], $sformatf("clock %0d after end-parse: record changed", k));
      end
      check(bp_o_l == (k == 0) && ep_o_l == (k == 3), "begin/end-parse copies");
    end
    bp = 0; ep = 0;
    // ---------------- update, lower row, every combination
    for (int c = 0; c < 32; c++) begin
      qreg_t r;
      bit v, d, li, ds, pv, want_done;
      {pv, v, d, li, ds} = 5'(c);
      r = rnd_rec();
      r.pvalid = pv; r.last_id = li; r.distg = ds;
      // load it with a one-clock load (bp and ep together)
      bp = 1; ep = 1; sh_in = r;
      @(negedge clk);
      bp = 0; ep = 0;
      upd = 1; dv = v; dd = d;
      @(negedge clk);
      upd = 0;
      want_done = v && d && li && ds;
      if (pv) begin
        check(q_l.ldone == v && q_l.rdone == d && q_l.done == want_done,
              $sformatf("update with production, v=%0b d=%0b last=%0b dist=%0b", v, d, li, ds));
        check(dv_o_l == want_done && dd_o_l == want_done, "update sends done both ways");
      end else begin
        check(!q_l.ldone && !q_l.rdone && !q_l.done, "update without production clears the flags");
        check(dv_o_l == v && dd_o_l == d, "update without production passes the inputs through");
      end
      check(q_t.ldone && q_t.done && q_t.rdone && dv_o_t && dd_o_t, "top-row update sets all flags and sends 1");
      check(q_l.prod == r.prod && q_l.l == r.l && q_l.b == r.b, "update keeps p and id");
      check(upd_o_l && upd_o_t, "update wave copied");
    end
    // ---------------- unload: shifts from the unload wave until begin-parse
    held = q_l;
    ul = 1; sh_in = recs[5];
    @(negedge clk);
    ul = 0;
    check(q_l == recs[5], "unload shift 1 takes the right neighbour's record");
    sh_in = recs[6];
    @(negedge clk);
    check(sh_out_l == recs[5] && q_l == recs[6], "unload continues on the next clock");
    // begin-parse ends the unload and starts a load
    bp = 1; sh_in = recs[7];
    @(negedge clk);
    bp = 0;
    check(q_l == recs[7], "begin-parse shifts");
    sh_in = recs[0];
    @(negedge clk);
    check(q_l == recs[0], "load continues until end-parse");
    ep = 1; sh_in = recs[1];
    @(negedge clk);
    ep = 0; sh_in = recs[2];
    @(negedge clk);
    check(q_l == recs[1], "no shift after end-parse");
    // ---------------- stop: ends an unload for good
    ul = 1; sh_in = recs[3];
    @(negedge clk);
    ul = 0; stp = 1; sh_in = recs[4];
    @(negedge clk);
    stp = 0;
    check(q_l == recs[3] && q_t == recs[3], "no shift in the stop clock");
    check(st_o_l && st_o_t, "stop wave copied on");
    bp = 1; ul = 1; sh_in = recs[5];
    @(negedge clk);
    bp = 0; ul = 0;
    @(negedge clk);
    check(q_l == recs[3] && q_t == recs[3] && !st_o_l, "no shift after the stop wave, even on begin-parse or unload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

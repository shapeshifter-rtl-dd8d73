// tb_shapeshifter_top: end-to-end test of the mode-switching core at its
// full size (64-entry queue, 4 wide, SP = 100, DP = 10,000 cycles, alpha =
// 3.0), with no parameter overridden.
//
// The testbench plays the rest of the core: it renames and dispatches a
// generated instruction stream, executes issued instructions with fixed
// latencies, broadcasts their result tags, commits them and reports fetch
// and commit counts. The run has three phases of three decision periods:
//   A - high parallelism: every eighth instruction is a 40-cycle load
//       followed by two dependants, the rest are independent; no wasted
//       fetches. Out-of-order execution pays off.
//   B - a serial dependency chain with occasional 300-cycle misses, and three
//       wrong-path fetches for every useful one. In-order is as good.
//   A again.
// Checks: each decision's fetch/commit counts against the testbench's own,
// CFR, S = IDR * CFR and the comparison with alpha against integer
// arithmetic, the decision of every period wholly inside a phase (A: out-
// of-order, B: in-order), that no instruction is dispatched while fetch is
// throttled, that in-order mode only ever issues the oldest waiting
// instructions, and that every instruction issues exactly once. Each
// mechanism must happen at least once: samples taken and skipped (stalled
// head), decisions both ways, a drain with fetch throttled, the switch to
// in-order, the switch back to out-of-order, out-of-order issue past a
// waiting instruction, and in-order issue.
module tb_shapeshifter_top;
  import ss_pkg::*;
  localparam int unsigned W = MACHINE_WIDTH;
  localparam int unsigned DP = DECISION_PERIOD;
  localparam int unsigned NPER = 9;                 // decision periods
  localparam longint unsigned FMAX = (64'd1 << FIX_W) - 1;

  logic clk = 0, rst_n = 0, flush = 0;
  fix_t alpha = ALPHA_DEFAULT;
  logic [W-1:0] disp_valid, wakeup_valid, issue_valid;
  iq_uop_t disp_uop [W];
  iq_uop_t issue_uop [W];
  tag_t wakeup_tag [W];
  logic disp_ready;
  logic [2:0] fetch_inc, commit_inc;
  logic core_empty, fetch_throttle;
  exec_mode_e exec_mode;
  mode_state_e mode_state;
  logic to_ino, to_ooo, decision_valid, decide_ooo, sample_taken, sample_skipped;
  fix_t idr, cfr, speedup;
  logic [CNT_W-1:0] period_fetch, period_commit;
  logic [6:0] iq_count;

  shapeshifter_top dut (
    .clk, .rst_n, .flush, .alpha, .disp_valid, .disp_uop, .disp_ready,
    .wakeup_valid, .wakeup_tag, .issue_valid, .issue_uop, .fetch_inc, .commit_inc,
    .core_empty, .fetch_throttle, .exec_mode, .mode_state, .to_ino, .to_ooo,
    .decision_valid, .decide_ooo, .idr, .cfr, .speedup, .sample_taken,
    .sample_skipped, .period_fetch, .period_commit, .iq_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_samples = 0, n_skipped = 0, n_dec_ooo = 0, n_dec_ino = 0, n_drain_cycles = 0;
  int n_to_ino = 0, n_to_ooo = 0, n_ooo_bypass = 0, n_ino_issue = 0;

  initial begin
    repeat (NPER * DP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL @cycle %0d: %s", cyc, s);
  endtask

  // ---- core model state -------------------------------------------------
  int unsigned cyc = 0;             // cycles since reset release
  int unsigned seq = 0;             // next instruction number
  logic done [512];                 // result tag has been broadcast
  int unsigned lat_of [int unsigned];   // latency by instruction number
  bit issued [int unsigned];        // issued, by instruction number
  int unsigned oldest = 0;          // oldest instruction not yet issued
  int unsigned wake_at [$];         // pending completions: cycle
  tag_t        wake_tag [$];
  int unsigned pend_commit = 0;
  int unsigned in_flight = 0;
  longint unsigned per_fetch = 0, per_commit = 0;
  longint unsigned exp_pf [$], exp_pc [$];
  int unsigned exp_per [$];

  function automatic int unsigned phase_of(input int unsigned c);
    int unsigned p = c / DP;
    return (p >= 3 && p < 6) ? 1 : 0;   // 0: phase A, 1: phase B
  endfunction

  function automatic tag_t tag_of(input int unsigned s);
    return tag_t'(s % 512);
  endfunction

  // build instruction s for the given phase
  function automatic iq_uop_t make_uop(input int unsigned s, input int unsigned ph,
                                       output int unsigned lat);
    iq_uop_t u;
    int unsigned k = s % 8;
    u.pc      = 64'(s) * 4;
    u.dst_tag = tag_of(s);
    u.dst_vld = 1'b1;
    if (ph == 0) begin
      if (k == 0) begin
        lat = 40;
        u.src1_tag = tag_of(s + 400); u.src2_tag = tag_of(s + 400);   // long done
      end else if (k <= 2) begin
        lat = 1;
        u.src1_tag = tag_of(s - k); u.src2_tag = tag_of(s + 400);
      end else begin
        lat = 1;
        u.src1_tag = tag_of(s + 400); u.src2_tag = tag_of(s + 401);
      end
    end else begin
      lat = (s % 64 == 0) ? 300 : 1;
      u.src1_tag = tag_of(s - 1); u.src2_tag = tag_of(s + 400);
    end
    u.src1_rdy = done[u.src1_tag];
    u.src2_rdy = done[u.src2_tag];
    return u;
  endfunction

  initial begin
    for (int i = 0; i < 512; i++) done[i] = 1'b1;
    disp_valid = 0; wakeup_valid = 0; fetch_inc = 0; commit_inc = 0; core_empty = 1;
    for (int s = 0; s < W; s++) begin disp_uop[s] = '0; wakeup_tag[s] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (cyc < NPER * DP) begin
      automatic int unsigned ph = phase_of(cyc);
      automatic int unsigned nw = 0, nd = 0, nf = 0;
      // --- issue observed this cycle (leaves the queue at the next edge)
      for (int s = 0; s < W; s++) if (issue_valid[s]) begin
        automatic int unsigned n = int'(issue_uop[s].pc / 4);
        automatic int unsigned lat = lat_of.exists(n) ? lat_of[n] : 1;
        checks++;
        if (issued.exists(n) || !lat_of.exists(n)) fail($sformatf("instruction %0d issued twice or never dispatched", n));
        if (n != oldest && mode_state == MS_INO) fail($sformatf("in-order mode issued %0d while %0d waits", n, oldest));
        if (n != oldest && mode_state != MS_INO) n_ooo_bypass++;
        if (mode_state == MS_INO) n_ino_issue++;
        issued[n] = 1;
        while (issued.exists(oldest)) begin issued.delete(oldest); lat_of.delete(oldest); oldest++; end
        wake_at.push_back(cyc + lat);
        wake_tag.push_back(issue_uop[s].dst_tag);
        in_flight++;
      end
      // --- completions: broadcast up to W tags whose time has come
      wakeup_valid = '0;
      for (int i = 0; i < wake_at.size() && nw < W; i++) begin
        if (wake_at[i] <= cyc) begin
          wakeup_valid[nw] = 1'b1;
          wakeup_tag[nw]   = wake_tag[i];
          done[wake_tag[i]] = 1'b1;
          wake_at.delete(i); wake_tag.delete(i); i--;
          nw++; in_flight--; pend_commit++;
        end
      end
      // --- commit
      commit_inc = 3'(pend_commit > W ? W : pend_commit);
      pend_commit -= commit_inc;
      // --- fetch and dispatch
      disp_valid = '0;
      if (!fetch_throttle && disp_ready) begin
        nd = (ph == 0) ? W : 1;
        nf = W;
        for (int s = 0; s < nd; s++) begin
          automatic int unsigned lat;
          disp_uop[s] = make_uop(seq, ph, lat);
          done[tag_of(seq)] = 1'b0;
          lat_of[seq] = lat;
          disp_valid[s] = 1'b1;
          seq++;
        end
      end
      if (fetch_throttle) n_drain_cycles++;
      fetch_inc = 3'(nf);
      core_empty = (in_flight == 0) && (pend_commit == 0) && (wake_at.size() == 0) && (commit_inc == 0);
      @(posedge clk);
      if (fetch_throttle && disp_valid != 0) fail("dispatch while fetch is throttled");
      // --- decision bookkeeping (the decision unit reads the counters,
      //     which include this edge's increments only from the next cycle)
      if (cyc % DP == DP - 1) begin
        exp_pf.push_back(per_fetch); exp_pc.push_back(per_commit); exp_per.push_back(cyc / DP);
        per_fetch = 0; per_commit = 0;
      end
      per_fetch += fetch_inc; per_commit += commit_inc;
      if (sample_taken) n_samples++;
      if (sample_skipped) n_skipped++;
      if (to_ino) n_to_ino++;
      if (to_ooo) n_to_ooo++;
      if (decision_valid) begin
        automatic longint unsigned pf, pc, ecfr, es;
        automatic int unsigned per;
        checks++;
        if (exp_pf.size() == 0) fail("unexpected decision");
        else begin
          pf = exp_pf.pop_front(); pc = exp_pc.pop_front(); per = exp_per.pop_front();
          ecfr = (pf == 0) ? ((pc == 0) ? 256 : FMAX) : (pc << FRAC_W) / pf;
          es = (longint'(idr) * ecfr) >> FRAC_W;
          if (es > FMAX) es = FMAX;
          if (period_fetch != CNT_W'(pf) || period_commit != CNT_W'(pc) || cfr != fix_t'(ecfr) ||
              speedup != fix_t'(es) || decide_ooo != (es > alpha))
            fail($sformatf("decision %0d: pf=%0d pc=%0d cfr=%0d s=%0d ooo=%0d expected %0d %0d %0d %0d",
                           per, period_fetch, period_commit, cfr, speedup, decide_ooo, pf, pc, ecfr, es));
          $display("period %0d (phase %s): IDR=%0.2f CFR=%0.2f S=%0.2f -> %s", per,
                   phase_of(per * DP) ? "B" : "A", real'(idr) / 256.0, real'(cfr) / 256.0,
                   real'(speedup) / 256.0, decide_ooo ? "out-of-order" : "in-order");
          // periods wholly inside a phase (not its first) must go the phase's way
          if (per % 3 != 0) begin
            checks++;
            if (decide_ooo != (phase_of(per * DP) == 0))
              fail($sformatf("period %0d decided %s", per, decide_ooo ? "out-of-order" : "in-order"));
          end
          if (decide_ooo) n_dec_ooo++; else n_dec_ino++;
        end
      end
      @(negedge clk);
      cyc++;
    end
    // let the last instructions finish
    checks++;
    if (n_samples == 0 || n_skipped == 0 || n_dec_ooo == 0 || n_dec_ino == 0 || n_drain_cycles == 0 ||
        n_to_ino == 0 || n_to_ooo == 0 || n_ooo_bypass == 0 || n_ino_issue == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: samples=%0d skipped=%0d decisions ooo=%0d ino=%0d drain-cycles=%0d to-ino=%0d to-ooo=%0d ooo-bypass=%0d ino-issues=%0d",
             n_samples, n_skipped, n_dec_ooo, n_dec_ino, n_drain_cycles, n_to_ino, n_to_ooo, n_ooo_bypass, n_ino_issue);
    $display("instructions dispatched=%0d", seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

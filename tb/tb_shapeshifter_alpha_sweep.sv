// tb_shapeshifter_alpha_sweep: threshold sweep of the full-size design.
//
// The same instruction stream is run four times on shapeshifter_top at its
// default size (64-entry queue, 4 wide, SP = 100, DP = 10,000 cycles): with
// alpha = 0, which keeps the core out-of-order and serves as the baseline,
// and with each evaluated fixed threshold alpha = 1, 3 and 5, with a reset
// in between. The stream mixes parallel stretches (40-cycle loads with
// independent work behind them) with serial dependency chains and wastes one
// fetch in three on the wrong path, so the speedup estimate S lands between
// the thresholds. For every decision S, CFR and the comparison are checked
// against integer arithmetic; across the sweep a higher threshold must never
// give fewer in-order periods, alpha = 1 must choose out-of-order at least
// once and alpha = 5 in-order at least once. The testbench also reports the
// share of cycles spent in in-order mode, W, the power estimate of a core
// whose in-order mode draws a quarter of the out-of-order power,
// PE = W/4 + (1 - W), the slowdown SR against the baseline (ratio of
// instructions completed in the same time), EDP = PE * SR and
// ED2P = PE * SR^2.
module tb_shapeshifter_alpha_sweep;
  import ss_pkg::*;
  localparam int unsigned W = MACHINE_WIDTH;
  localparam int unsigned DP = DECISION_PERIOD;
  localparam int unsigned NPER = 6;
  localparam longint unsigned FMAX = (64'd1 << FIX_W) - 1;

  logic clk = 0, rst_n = 0, flush = 0;
  fix_t alpha;
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

  initial begin
    repeat (4 * (NPER * DP + 1000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- core model state -------------------------------------------------
  int unsigned cyc, seq, oldest, pend_commit, in_flight;
  logic done [512];
  int unsigned lat_of [int unsigned];
  bit issued [int unsigned];
  int unsigned wake_at [$];
  tag_t        wake_tag [$];
  longint unsigned per_fetch, per_commit;
  longint unsigned exp_pf [$], exp_pc [$];
  int unsigned n_ino_dec, n_ooo_dec, ino_cycles;

  function automatic tag_t tag_of(input int unsigned s);
    return tag_t'(s % 512);
  endfunction

  // Instruction s: blocks of 64 instructions alternate between a parallel
  // pattern and a serial chain.
  function automatic iq_uop_t make_uop(input int unsigned s, output int unsigned lat);
    iq_uop_t u;
    int unsigned k = s % 8;
    u.pc      = 64'(s) * 4;
    u.dst_tag = tag_of(s);
    u.dst_vld = 1'b1;
    u.src2_tag = tag_of(s + 400);
    if ((s / 64) % 2 == 0) begin
      lat = (k == 0) ? 40 : 1;
      u.src1_tag = (k == 1 || k == 2) ? tag_of(s - k) : tag_of(s + 401);
    end else begin
      lat = (s % 64 == 1) ? 60 : 1;
      u.src1_tag = tag_of(s - 1);
    end
    u.src1_rdy = done[u.src1_tag];
    u.src2_rdy = done[u.src2_tag];
    return u;
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL @cycle %0d: %s", cyc, s);
  endtask

  task automatic run(input int unsigned a_int);
    alpha = fix_t'(a_int) << FRAC_W;
    cyc = 0; seq = 0; oldest = 0; pend_commit = 0; in_flight = 0;
    per_fetch = 0; per_commit = 0; n_ino_dec = 0; n_ooo_dec = 0; ino_cycles = 0;
    for (int i = 0; i < 512; i++) done[i] = 1'b1;
    lat_of.delete(); issued.delete(); wake_at.delete(); wake_tag.delete();
    exp_pf.delete(); exp_pc.delete();
    disp_valid = 0; wakeup_valid = 0; fetch_inc = 0; commit_inc = 0; core_empty = 1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (cyc < NPER * DP) begin
      automatic int unsigned nw = 0, nd = 0, nf = 0;
      for (int s = 0; s < W; s++) if (issue_valid[s]) begin
        automatic int unsigned n = int'(issue_uop[s].pc / 4);
        automatic int unsigned lat = lat_of.exists(n) ? lat_of[n] : 1;
        checks++;
        if (issued.exists(n)) fail($sformatf("instruction %0d issued twice", n));
        if (n != oldest && mode_state == MS_INO) fail($sformatf("in-order mode issued %0d while %0d waits", n, oldest));
        issued[n] = 1;
        while (issued.exists(oldest)) begin issued.delete(oldest); lat_of.delete(oldest); oldest++; end
        wake_at.push_back(cyc + lat);
        wake_tag.push_back(issue_uop[s].dst_tag);
        in_flight++;
      end
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
      commit_inc = 3'(pend_commit > W ? W : pend_commit);
      pend_commit -= commit_inc;
      disp_valid = '0;
      if (!fetch_throttle && disp_ready) begin
        // one wrong-path fetch for every two useful ones on average
        nf = W;
        nd = (cyc % 3 == 0) ? 2 : 3;
        for (int s = 0; s < nd; s++) begin
          automatic int unsigned lat;
          disp_uop[s] = make_uop(seq, lat);
          done[tag_of(seq)] = 1'b0;
          lat_of[seq] = lat;
          disp_valid[s] = 1'b1;
          seq++;
        end
      end
      fetch_inc = 3'(nf);
      core_empty = (in_flight == 0) && (pend_commit == 0) && (wake_at.size() == 0) && (commit_inc == 0);
      if (mode_state == MS_INO) ino_cycles++;
      @(posedge clk);
      if (fetch_throttle && disp_valid != 0) fail("dispatch while fetch is throttled");
      if (cyc % DP == DP - 1) begin
        exp_pf.push_back(per_fetch); exp_pc.push_back(per_commit);
        per_fetch = 0; per_commit = 0;
      end
      per_fetch += fetch_inc; per_commit += commit_inc;
      if (decision_valid) begin
        automatic longint unsigned pf, pc, ecfr, es;
        checks++;
        if (exp_pf.size() == 0) fail("unexpected decision");
        else begin
          pf = exp_pf.pop_front(); pc = exp_pc.pop_front();
          ecfr = (pf == 0) ? ((pc == 0) ? 256 : FMAX) : (pc << FRAC_W) / pf;
          es = (longint'(idr) * ecfr) >> FRAC_W;
          if (es > FMAX) es = FMAX;
          if (period_fetch != CNT_W'(pf) || period_commit != CNT_W'(pc) || cfr != fix_t'(ecfr) ||
              speedup != fix_t'(es) || decide_ooo != (es > alpha))
            fail($sformatf("decision: pf=%0d pc=%0d cfr=%0d s=%0d ooo=%0d expected %0d %0d %0d %0d",
                           period_fetch, period_commit, cfr, speedup, decide_ooo, pf, pc, ecfr, es));
          $display("alpha=%0d period %0d: IDR=%0.2f CFR=%0.2f S=%0.2f -> %s", a_int, cyc / DP,
                   real'(idr) / 256.0, real'(cfr) / 256.0, real'(speedup) / 256.0,
                   decide_ooo ? "out-of-order" : "in-order");
          if (decide_ooo) n_ooo_dec++; else n_ino_dec++;
        end
      end
      @(negedge clk);
      cyc++;
    end
  endtask

  int unsigned ino_dec [4];
  int unsigned ooo_dec [4];
  int unsigned alphas [4] = '{0, 1, 3, 5};
  int unsigned base_insts;

  initial begin
    for (int r = 0; r < 4; r++) begin
      automatic real wv, pe, sr;
      run(alphas[r]);
      ino_dec[r] = n_ino_dec; ooo_dec[r] = n_ooo_dec;
      if (r == 0) base_insts = seq;
      wv = real'(ino_cycles) / real'(NPER * DP);
      pe = wv / 4.0 + (1.0 - wv);
      sr = real'(base_insts) / real'(seq);
      $display("alpha=%0d: in-order decisions %0d of %0d, in-order time W=%0.1f%%, PE=%0.3f, slowdown SR=%0.3f, EDP=%0.3f, ED2P=%0.3f",
               alphas[r], n_ino_dec, n_ino_dec + n_ooo_dec, 100.0 * wv, pe, sr, pe * sr, pe * sr * sr);
    end
    checks++;
    if (!(ino_dec[0] <= ino_dec[1] && ino_dec[1] <= ino_dec[2] && ino_dec[2] <= ino_dec[3]))
      fail("higher threshold gave fewer in-order periods");
    checks++;
    if (ino_dec[0] != 0) fail("alpha = 0 (baseline) chose in-order");
    checks++;
    if (ooo_dec[1] == 0) fail("alpha = 1 never chose out-of-order");
    checks++;
    if (ino_dec[3] == 0) fail("alpha = 5 never chose in-order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ss_decision_unit: self-checking test of the decision circuit.
// Runs with short periods (SP = 40, DP = 400 cycles) so that many decisions
// fit in a short run. Each period picks a regime (high or low parallelism,
// few or many wasted fetches, often a stalled head PC) and a threshold
// (1.0, 3.0 or 5.0). A testbench model follows Algorithm-style bookkeeping
// cycle by cycle: samples at every SP-th cycle unless it is a decision
// cycle, the head-PC filter, the accumulators, the period fetch/commit
// differences, IDR, CFR, S = IDR * CFR and the comparison with alpha. Every
// decision is compared field by field, its latency must be the same every
// time and shorter than SP, and the sample/skip counts must agree.
module tb_ss_decision_unit;
  import ss_pkg::*;
  localparam int unsigned SP = 40, DP = 400, NDEC = 60;
  localparam longint unsigned FMAX = (64'd1 << FIX_W) - 1;

  logic clk = 0, rst_n = 0;
  logic [6:0] ready_cnt, head_ready_cnt;
  pc_t head_pc;
  logic [CNT_W-1:0] fetch_count, commit_count;
  fix_t alpha;
  logic decision_valid, decide_ooo;
  fix_t idr, cfr, speedup;
  logic [CNT_W-1:0] period_fetch, period_commit, acc_ready, acc_head;
  logic sample_taken, sample_skipped, sample_dropped;

  int checks = 0, failures = 0;

  ss_decision_unit #(.SP(SP), .DP(DP), .IQ_DEPTH(64)) dut (
    .clk, .rst_n, .ready_cnt, .head_ready_cnt, .head_pc, .fetch_count, .commit_count,
    .alpha, .decision_valid, .decide_ooo, .idr, .cfr, .speedup, .period_fetch,
    .period_commit, .sample_taken, .sample_skipped, .sample_dropped, .acc_ready, .acc_head);

  always #5 clk = ~clk;

  initial begin
    repeat (NDEC * DP + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    longint unsigned idr, cfr, s, pf, pc;
    logic ooo;
    int unsigned at;
  } dec_t;
  dec_t exp_q [$];

  // model state
  longint unsigned m_ar = 0, m_ah = 0, m_pf = 0, m_pc = 0;
  pc_t m_prev_pc = '0;
  int unsigned cyc = 0;
  int unsigned m_taken = 0, m_skipped = 0, d_taken = 0, d_skipped = 0;
  int latency = -1;
  int n_ooo = 0, n_ino = 0, n_zero = 0;

  function automatic longint unsigned ratio(input longint unsigned n, input longint unsigned d);
    if (d == 0) return (n == 0) ? 256 : FMAX;
    return (n << FRAC_W) / d;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // model of the sampling and decision bookkeeping
    if (cyc % DP == DP - 1) begin
      dec_t e;
      longint unsigned dc, df;
      dc = (longint'(commit_count) - m_pc) & 64'hFFFF;
      df = (longint'(fetch_count) - m_pf) & 64'hFFFF;
      m_pc = commit_count; m_pf = fetch_count;
      e.idr = ratio(m_ar, m_ah);
      e.cfr = ratio(dc, df);
      e.s   = (e.idr * e.cfr) >> FRAC_W;
      if (e.s > FMAX) e.s = FMAX;
      e.ooo = (e.s > alpha);
      e.pf = df; e.pc = dc; e.at = cyc;
      if (m_ah == 0 || df == 0) n_zero++;
      exp_q.push_back(e);
      m_ar = 0; m_ah = 0;
    end else if (cyc % SP == SP - 1) begin
      if (head_pc != m_prev_pc) begin
        m_ar += ready_cnt; m_ah += head_ready_cnt; m_taken++;
      end else m_skipped++;
      m_prev_pc = head_pc;
    end
    cyc <= cyc + 1;
    if (sample_taken) d_taken++;
    if (sample_skipped) d_skipped++;
    checks++;
    if (sample_dropped) begin failures++; $display("FAIL sample dropped"); end
    if (decision_valid) begin
      dec_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected decision");
      end else begin
        e = exp_q.pop_front();
        if (latency < 0) latency = cyc - e.at;
        if (idr !== e.idr[FIX_W-1:0] || cfr !== e.cfr[FIX_W-1:0] || speedup !== e.s[FIX_W-1:0] ||
            decide_ooo !== e.ooo || period_fetch !== e.pf[CNT_W-1:0] ||
            period_commit !== e.pc[CNT_W-1:0] || int'(cyc - e.at) != latency || latency >= SP) begin
          failures++;
          $display("FAIL decision @%0d: idr=%0d cfr=%0d s=%0d ooo=%0d pf=%0d pc=%0d lat=%0d | exp %0d %0d %0d %0d %0d %0d lat=%0d",
                   cyc, idr, cfr, speedup, decide_ooo, period_fetch, period_commit, cyc - e.at,
                   e.idr, e.cfr, e.s, e.ooo, e.pf, e.pc, latency);
        end
        if (decide_ooo) n_ooo++; else n_ino++;
      end
    end
  end

  int unsigned regime;
  initial begin
    ready_cnt = 0; head_ready_cnt = 0; head_pc = 0; fetch_count = 0; commit_count = 0;
    alpha = ALPHA_DEFAULT;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int d = 0; d < NDEC; d++) begin
      regime = $urandom_range(0, 5);
      for (int c = 0; c < DP; c++) begin
        int unsigned h, r, fi, ci;
        // the threshold changes mid-period, away from the decision sequence
        if (c == DP / 2)
          case (d % 3)
            0: alpha = fix_t'(1) << FRAC_W;
            1: alpha = fix_t'(3) << FRAC_W;
            default: alpha = fix_t'(5) << FRAC_W;
          endcase
        // parallelism
        case (regime)
          0, 1:    begin h = $urandom_range(0, 4); r = h + $urandom_range(0, 40); end  // high ILP
          2, 3:    begin h = $urandom_range(1, 4); r = h + $urandom_range(0, 2);  end  // low ILP
          4:       begin h = 0; r = 0; end                                           // nothing ready
          default: begin h = $urandom_range(0, 8); r = h + $urandom_range(0, 8);  end
        endcase
        ready_cnt = 7'(r); head_ready_cnt = 7'(h);
        // the head moves on most cycles; in regime 2 it is stuck for long
        // stretches, so consecutive samples see the same head PC
        if (regime == 2 ? (c % 100 == 0) : ($urandom_range(0, 2) != 0)) head_pc = head_pc + 64'd4;
        // fetch and commit
        fi = (regime == 4 && d % 2 == 0) ? 0 : $urandom_range(0, 4);
        ci = (regime == 3) ? ((fi > 0 && $urandom_range(0, 3) == 0) ? 1 : 0) : (fi > 0 ? fi - $urandom_range(0, 1) : 0);
        fetch_count  = fetch_count + CNT_W'(fi);
        commit_count = commit_count + CNT_W'(ci);
        @(negedge clk);
      end
    end
    // long enough for the last decision, short of the next sampling point
    repeat (SP - 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d decisions missing", exp_q.size()); end
    checks++;
    if (m_taken != d_taken || m_skipped != d_skipped) begin
      failures++; $display("FAIL samples taken/skipped %0d/%0d expected %0d/%0d", d_taken, d_skipped, m_taken, m_skipped);
    end
    checks++;
    if (n_ooo == 0 || n_ino == 0 || n_zero == 0 || m_skipped == 0) begin
      failures++; $display("FAIL coverage ooo=%0d ino=%0d zero=%0d skipped=%0d", n_ooo, n_ino, n_zero, m_skipped);
    end
    $display("decisions: ooo=%0d ino=%0d zero-denominator=%0d latency=%0d samples=%0d skipped=%0d",
             n_ooo, n_ino, n_zero, latency, m_taken, m_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

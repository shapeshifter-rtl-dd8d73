// shapeshifter_top: mode-switching core of the ShapeShifter processor.
//
// ShapeShifter is a single out-of-order core that can behave as an in-order
// core to save power when out-of-order execution would gain little. This
// module holds the parts of the core that make it morph:
//   * ss_issue_queue    - the issue queue, which picks instructions either
//                         out of order or in strict program order and
//                         reports how many are ready overall and at its head;
//   * ss_event_counters - running counts of fetched and committed
//                         instructions;
//   * ss_decision_unit  - samples the queue every SP cycles and, every DP
//                         cycles, computes S = IDR * CFR and compares it with
//                         the threshold alpha;
//   * ss_mode_ctrl      - switches to out-of-order at once, and to in-order
//                         only after throttling fetch and draining the core.
// The rest of the core (fetch and branch prediction, rename, reorder buffer,
// register files, load/store queue, execution units and caches) is outside:
// its dispatch, wakeup, issue, fetch/commit and "empty" signals are ports.
//
// Interface and timing: the dispatch/issue/wakeup ports are those of
// ss_issue_queue. fetch_inc/commit_inc give the instructions fetched and
// committed in the cycle. core_empty must be high when no instruction is
// in flight outside the issue queue (front end, reorder buffer, execution
// units); the drain to in-order ends when it is high and the queue is
// empty. fetch_throttle asks the fetch stage to stop. alpha is the decision
// threshold in unsigned fixed point with FRAC_W = 8 fraction bits (3.0 is
// 768, the main configuration). The decision outputs report each decision
// for observation, including the fetch and commit counts of the last
// decision period. Reset is synchronous and active low; the core starts in
// out-of-order mode.
module shapeshifter_top
  import ss_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = IQ_ENTRIES,
  parameter int unsigned WIDTH    = MACHINE_WIDTH,
  parameter int unsigned SP       = SAMPLE_PERIOD,
  parameter int unsigned DP       = DECISION_PERIOD,
  localparam int unsigned RC_W    = $clog2(IQ_DEPTH + 1),
  localparam int unsigned INC_W   = $clog2(WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  fix_t             alpha,
  // dispatch from rename
  input  logic [WIDTH-1:0] disp_valid,
  input  iq_uop_t          disp_uop     [WIDTH],
  output logic             disp_ready,
  // wakeup from the execution units
  input  logic [WIDTH-1:0] wakeup_valid,
  input  tag_t             wakeup_tag   [WIDTH],
  // issue to the execution units
  output logic [WIDTH-1:0] issue_valid,
  output iq_uop_t          issue_uop    [WIDTH],
  // pipeline activity
  input  logic [INC_W-1:0] fetch_inc,
  input  logic [INC_W-1:0] commit_inc,
  input  logic             core_empty,
  output logic             fetch_throttle,
  // mode
  output exec_mode_e       exec_mode,
  output mode_state_e      mode_state,
  output logic             to_ino,
  output logic             to_ooo,
  // decision observation
  output logic             decision_valid,
  output logic             decide_ooo,
  output fix_t             idr,
  output fix_t             cfr,
  output fix_t             speedup,
  output logic             sample_taken,
  output logic             sample_skipped,
  output logic [CNT_W-1:0] period_fetch,
  output logic [CNT_W-1:0] period_commit,
  output logic [RC_W-1:0]  iq_count
);

  logic [RC_W-1:0]  ready_cnt, head_ready_cnt;
  logic             iq_empty;
  pc_t              head_pc;
  logic [CNT_W-1:0] fetch_count, commit_count;
  logic             sample_dropped;

  ss_issue_queue #(.DEPTH(IQ_DEPTH), .WIDTH(WIDTH)) u_iq (
    .clk, .rst_n, .flush,
    .mode           (exec_mode),
    .disp_valid, .disp_uop, .disp_ready,
    .wakeup_valid, .wakeup_tag,
    .issue_valid, .issue_uop,
    .count          (iq_count),
    .ready_cnt, .head_ready_cnt, .head_pc,
    .head_valid     (),
    .empty          (iq_empty)
  );

  ss_event_counters #(.WIDTH(WIDTH), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .fetch_inc, .commit_inc, .fetch_count, .commit_count
  );

  ss_decision_unit #(.SP(SP), .DP(DP), .IQ_DEPTH(IQ_DEPTH)) u_dec (
    .clk, .rst_n,
    .ready_cnt, .head_ready_cnt, .head_pc,
    .fetch_count, .commit_count, .alpha,
    .decision_valid, .decide_ooo, .idr, .cfr, .speedup,
    .period_fetch, .period_commit,
    .sample_taken, .sample_skipped, .sample_dropped,
    .acc_ready      (),
    .acc_head       ()
  );

  ss_mode_ctrl u_mode (
    .clk, .rst_n,
    .decision_valid, .decide_ooo,
    .pipe_empty     (iq_empty && core_empty),
    .state          (mode_state),
    .exec_mode, .fetch_throttle, .to_ino, .to_ooo
  );

  // With the sampling period longer than a decision, no sample is lost.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !sample_dropped);

endmodule

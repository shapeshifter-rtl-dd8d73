// ss_decision_unit: the mode-change decision circuit of ShapeShifter.
//
// It chooses between out-of-order and in-order execution from two
// statistics, gathered over two nested periods:
//   * every sampling period (SP cycles) it samples the issue queue: the
//     number of ready instructions anywhere in it and the number ready at
//     its head are added to two accumulators, but only if the PC of the head
//     instruction differs from the one seen at the previous sample (so a
//     stalled queue is not counted again and again);
//   * at the end of every decision period (DP cycles, a multiple of SP in
//     the main configuration) it computes
//       IDR = accumulated ready / accumulated ready-at-head
//       CFR = commits in the period / fetches in the period
//       S   = IDR * CFR
//     and asks for out-of-order execution if S > alpha, in-order otherwise.
//     The accumulators are then cleared. No sample is taken in the cycle of
//     a decision.
// The fetch and commit counts of the period are the differences between
// the running counters and their values at the previous decision.
//
// Hardware: one adder/subtractor/comparator (ss_alu) does every addition,
// subtraction and the final comparison, one pipelined divider (ss_divider)
// computes IDR and CFR back to back and one multiplier (ss_multiplier) forms
// S. A small sequencer runs the steps:
//   sample:   ADD_R (acc_ready += ready), ADD_H (acc_head += ready at head)
//   decision: (IDR division starts) SUB_C, SUB_F, DIV_CFR, WAIT (both
//             quotients), MUL, MUL_WAIT, CMP (alpha - S; a borrow means
//             S > alpha)
// A decision takes 32 cycles (CNT_W + FRAC_W + 8), so SP must be longer than
// that; a sample that would fall inside a running decision is dropped
// (`sample_dropped`; never the case for SP = 100).
//
// Ratios are unsigned fixed point with FRAC fraction bits. A ratio x/0 is
// taken as the largest value; 0/0 (nothing ready, or nothing fetched) as
// 1.0. Accumulators saturate instead of wrapping.
//
// Interface and timing: inputs are sampled on rising edges; reset is
// synchronous and active low and clears all periods. The first decision
// comes DP cycles after reset. `decision_valid` pulses for one cycle with
// `decide_ooo`; `idr`, `cfr` and `speedup` hold the values of the latest
// decision. `sample_taken`/`sample_skipped` pulse at each sampling point.
// The statistics, the periods, the PC filter, Equations (1)-(4) and the use
// of a single comparator, a divider and a multiplier follow the design; the
// sequencer, the number formats and the handling of zero denominators are
// this implementation's choices.
module ss_decision_unit
  import ss_pkg::*;
#(
  parameter int unsigned SP       = SAMPLE_PERIOD,
  parameter int unsigned DP       = DECISION_PERIOD,
  parameter int unsigned IQ_DEPTH = IQ_ENTRIES,
  localparam int unsigned RC_W    = $clog2(IQ_DEPTH + 1),
  localparam int unsigned DPC_W   = $clog2(DP),
  localparam int unsigned SPC_W   = $clog2(SP)
) (
  input  logic             clk,
  input  logic             rst_n,
  // issue queue status
  input  logic [RC_W-1:0]  ready_cnt,
  input  logic [RC_W-1:0]  head_ready_cnt,
  input  pc_t              head_pc,
  // running counters of the core
  input  logic [CNT_W-1:0] fetch_count,
  input  logic [CNT_W-1:0] commit_count,
  // threshold
  input  fix_t             alpha,
  // decision
  output logic             decision_valid,
  output logic             decide_ooo,
  output fix_t             idr,
  output fix_t             cfr,
  output fix_t             speedup,
  output logic [CNT_W-1:0] period_fetch,
  output logic [CNT_W-1:0] period_commit,
  // sampling
  output logic             sample_taken,
  output logic             sample_skipped,
  output logic             sample_dropped,
  output logic [CNT_W-1:0] acc_ready,
  output logic [CNT_W-1:0] acc_head
);

  localparam fix_t ONE = fix_t'(1) << FRAC_W;
  localparam int unsigned SEQ_LEN = CNT_W + FRAC_W + 8;

  if (SP <= SEQ_LEN) begin : g_sp_check
    $error("ss_decision_unit: SP must exceed the decision sequence length");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_ADD_R, S_ADD_H, S_SUB_C, S_SUB_F, S_DIV_CFR, S_WAIT,
    S_MUL, S_MUL_WAIT, S_CMP
  } seq_e;

  seq_e             seq;
  logic [DPC_W-1:0] dp_cnt;
  logic [SPC_W-1:0] sp_cnt;
  logic             dp_event, sp_event;

  logic [RC_W-1:0]  smp_ready, smp_head;
  pc_t              prev_pc;
  logic [CNT_W-1:0] prev_fetch, prev_commit, snap_fetch, snap_commit;
  logic             idr_got, cfr_got, idr_zz, cfr_zz;

  // shared add/subtract/compare unit
  logic             alu_op;
  fix_t             alu_a, alu_b, alu_y;
  logic             alu_c, alu_z;

  // divider and multiplier
  logic             div_in_valid, div_out_valid;
  logic [CNT_W-1:0] div_num, div_den;
  logic             div_in_tag, div_out_tag;
  fix_t             div_q;
  logic             mul_in_valid, mul_out_valid;
  fix_t             mul_p;

  assign dp_event = (dp_cnt == DPC_W'(DP - 1));
  assign sp_event = (sp_cnt == SPC_W'(SP - 1)) && !dp_event;

  // Operand selection for the shared unit
  always_comb begin
    alu_op = 1'b0;
    alu_a  = '0;
    alu_b  = '0;
    unique case (seq)
      S_ADD_R: begin alu_op = 1'b0; alu_a = fix_t'(acc_ready);   alu_b = fix_t'(smp_ready);   end
      S_ADD_H: begin alu_op = 1'b0; alu_a = fix_t'(acc_head);    alu_b = fix_t'(smp_head);    end
      S_SUB_C: begin alu_op = 1'b1; alu_a = fix_t'(snap_commit); alu_b = fix_t'(prev_commit); end
      S_SUB_F: begin alu_op = 1'b1; alu_a = fix_t'(snap_fetch);  alu_b = fix_t'(prev_fetch);  end
      S_CMP:   begin alu_op = 1'b1; alu_a = alpha;               alu_b = speedup;             end
      default: ;
    endcase
  end

  ss_alu #(.W(FIX_W)) u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .carry(alu_c), .zero(alu_z)
  );

  // Saturating accumulate: an addition whose result leaves CNT_W bits sticks
  // at the maximum.
  function automatic logic [CNT_W-1:0] sat_cnt(input fix_t v);
    return (v[FIX_W-1:CNT_W] != '0) ? '1 : v[CNT_W-1:0];
  endfunction

  // Divider start: IDR in the decision cycle, CFR once both differences are
  // known.
  always_comb begin
    div_in_valid = 1'b0;
    div_num      = '0;
    div_den      = '0;
    div_in_tag   = 1'b0;
    if (seq == S_IDLE && dp_event) begin
      div_in_valid = 1'b1;
      div_num      = acc_ready;
      div_den      = acc_head;
      div_in_tag   = 1'b0;
    end else if (seq == S_DIV_CFR) begin
      div_in_valid = 1'b1;
      div_num      = period_commit;
      div_den      = period_fetch;
      div_in_tag   = 1'b1;
    end
  end

  ss_divider #(.NUM_W(CNT_W), .DEN_W(CNT_W), .FRAC(FRAC_W), .TAG_W(1)) u_div (
    .clk, .rst_n,
    .in_valid(div_in_valid), .num(div_num), .den(div_den), .in_tag(div_in_tag),
    .out_valid(div_out_valid), .quot(div_q), .out_tag(div_out_tag)
  );

  assign mul_in_valid = (seq == S_MUL);

  ss_multiplier #(.W(FIX_W), .FRAC(FRAC_W)) u_mul (
    .clk, .rst_n,
    .in_valid(mul_in_valid), .a(idr), .b(cfr),
    .out_valid(mul_out_valid), .prod(mul_p)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq            <= S_IDLE;
      dp_cnt         <= '0;
      sp_cnt         <= '0;
      acc_ready      <= '0;
      acc_head       <= '0;
      smp_ready      <= '0;
      smp_head       <= '0;
      prev_pc        <= '0;
      prev_fetch     <= '0;
      prev_commit    <= '0;
      snap_fetch     <= '0;
      snap_commit    <= '0;
      period_fetch   <= '0;
      period_commit  <= '0;
      idr            <= ONE;
      cfr            <= ONE;
      speedup        <= ONE;
      idr_got        <= 1'b0;
      cfr_got        <= 1'b0;
      idr_zz         <= 1'b0;
      cfr_zz         <= 1'b0;
      decision_valid <= 1'b0;
      decide_ooo     <= 1'b1;
      sample_taken   <= 1'b0;
      sample_skipped <= 1'b0;
      sample_dropped <= 1'b0;
    end else begin
      decision_valid <= 1'b0;
      sample_taken   <= 1'b0;
      sample_skipped <= 1'b0;
      sample_dropped <= 1'b0;

      // period timers
      dp_cnt <= dp_event ? '0 : dp_cnt + 1'b1;
      sp_cnt <= (dp_event || sp_cnt == SPC_W'(SP - 1)) ? '0 : sp_cnt + 1'b1;

      // divider results, in whichever order they come
      if (div_out_valid) begin
        if (div_out_tag == 1'b0) begin
          idr     <= idr_zz ? ONE : div_q;
          idr_got <= 1'b1;
        end else begin
          cfr     <= cfr_zz ? ONE : div_q;
          cfr_got <= 1'b1;
        end
      end

      unique case (seq)
        S_IDLE: begin
          if (dp_event) begin
            // decision point: IDR division starts now (see above)
            idr_zz      <= (acc_ready == '0) && (acc_head == '0);
            idr_got     <= 1'b0;
            cfr_got     <= 1'b0;
            snap_fetch  <= fetch_count;
            snap_commit <= commit_count;
            acc_ready   <= '0;
            acc_head    <= '0;
            seq         <= S_SUB_C;
          end else if (sp_event) begin
            prev_pc <= head_pc;
            if (head_pc != prev_pc) begin
              smp_ready    <= ready_cnt;
              smp_head     <= head_ready_cnt;
              sample_taken <= 1'b1;
              seq          <= S_ADD_R;
            end else begin
              sample_skipped <= 1'b1;
            end
          end
        end
        S_ADD_R: begin
          acc_ready <= alu_c ? '1 : sat_cnt(alu_y);
          seq       <= S_ADD_H;
        end
        S_ADD_H: begin
          acc_head <= alu_c ? '1 : sat_cnt(alu_y);
          seq      <= S_IDLE;
        end
        S_SUB_C: begin
          period_commit <= alu_y[CNT_W-1:0];   // modulo 2^CNT_W
          prev_commit   <= snap_commit;
          seq           <= S_SUB_F;
        end
        S_SUB_F: begin
          period_fetch <= alu_y[CNT_W-1:0];
          prev_fetch   <= snap_fetch;
          seq          <= S_DIV_CFR;
        end
        S_DIV_CFR: begin
          cfr_zz <= (period_commit == '0) && (period_fetch == '0);
          seq    <= S_WAIT;
        end
        S_WAIT: begin
          if (idr_got && cfr_got) seq <= S_MUL;
        end
        S_MUL: begin
          seq <= S_MUL_WAIT;
        end
        S_MUL_WAIT: begin
          if (mul_out_valid) begin
            speedup <= mul_p;
            seq     <= S_CMP;
          end
        end
        S_CMP: begin
          // alpha - S borrows exactly when S > alpha
          decide_ooo     <= alu_c;
          decision_valid <= 1'b1;
          seq            <= S_IDLE;
        end
        default: seq <= S_IDLE;
      endcase

      if (seq != S_IDLE && sp_event) sample_dropped <= 1'b1;
    end
  end

  // A decision point never finds the sequencer busy.
  a_dp_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dp_event |-> seq == S_IDLE);

endmodule

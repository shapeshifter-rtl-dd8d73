// ss_mode_ctrl: applies the execution-mode decisions of the decision logic.
//
// The two directions of a mode switch are not alike. Going from in-order to
// out-of-order is immediate: the instructions in flight simply continue
// under the out-of-order scheduler. Going from out-of-order to in-order
// first throttles fetch and lets the window drain of everything that was
// started out of order; only when the pipeline is empty does the core run
// in-order. Three states follow from that:
//   MS_OOO   - out-of-order issue, fetch free;
//   MS_DRAIN - out-of-order issue continues, fetch throttled, waiting for
//              `pipe_empty`;
//   MS_INO   - in-order issue, fetch free.
// A decision for out-of-order that arrives while draining cancels the drain.
// After reset the core runs out-of-order.
//
// Interface and timing: decision_valid/decide_ooo is a one-cycle decision
// pulse; the state, `exec_mode` and `fetch_throttle` are registered and
// change on the next edge. `to_ino` and `to_ooo` pulse for one cycle when
// the in-order or out-of-order mode is entered. The draining behaviour is
// the design's; the cancellation of a drain is this implementation's choice.
module ss_mode_ctrl
  import ss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        decision_valid,
  input  logic        decide_ooo,
  input  logic        pipe_empty,
  output mode_state_e state,
  output exec_mode_e  exec_mode,
  output logic        fetch_throttle,
  output logic        to_ino,
  output logic        to_ooo
);

  mode_state_e state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      MS_OOO:   if (decision_valid && !decide_ooo) state_n = MS_DRAIN;
      MS_DRAIN: if (decision_valid && decide_ooo)  state_n = MS_OOO;
                else if (pipe_empty)               state_n = MS_INO;
      MS_INO:   if (decision_valid && decide_ooo)  state_n = MS_OOO;
      default:                                     state_n = MS_OOO;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= MS_OOO;
      to_ino <= 1'b0;
      to_ooo <= 1'b0;
    end else begin
      state  <= state_n;
      to_ino <= (state_n == MS_INO) && (state != MS_INO);
      to_ooo <= (state_n == MS_OOO) && (state == MS_INO);
    end
  end

  assign exec_mode      = (state == MS_INO) ? EXEC_INO : EXEC_OOO;
  assign fetch_throttle = (state == MS_DRAIN);

  // In-order mode is only reached through a drain.
  a_drain_first: assert property (@(posedge clk) disable iff (!rst_n)
    (state == MS_INO && $past(state) != MS_INO) |-> $past(state) == MS_DRAIN && $past(pipe_empty));

endmodule

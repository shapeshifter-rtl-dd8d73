// tb_ss_mode_ctrl: self-checking test of the mode controller.
// Directed scenarios: an in-order decision drains (fetch throttled, issue
// still out of order) until the pipeline is empty and only then enters
// in-order mode; an out-of-order decision leaves in-order mode at once; an
// out-of-order decision cancels a drain; repeated decisions for the current
// mode change nothing. A random phase then compares every cycle against a
// testbench model of the three-state behaviour.
module tb_ss_mode_ctrl;
  import ss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic decision_valid, decide_ooo, pipe_empty;
  mode_state_e state;
  exec_mode_e  exec_mode;
  logic fetch_throttle, to_ino, to_ooo;
  int checks = 0, failures = 0;
  int n_drain = 0, n_ino = 0, n_ooo = 0, n_cancel = 0;

  ss_mode_ctrl dut (.clk, .rst_n, .decision_valid, .decide_ooo, .pipe_empty,
                    .state, .exec_mode, .fetch_throttle, .to_ino, .to_ooo);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input mode_state_e s, input string what);
    checks++;
    if (state !== s || fetch_throttle !== (s == MS_DRAIN) ||
        exec_mode !== (s == MS_INO ? EXEC_INO : EXEC_OOO)) begin
      failures++;
      $display("FAIL %s: state=%0d throttle=%0d mode=%0d expected state %0d", what, state, fetch_throttle, exec_mode, s);
    end
  endtask

  task automatic step(input logic dv, input logic dooo, input logic pe);
    decision_valid = dv; decide_ooo = dooo; pipe_empty = pe;
    @(posedge clk);
    @(negedge clk);
    decision_valid = 0;
  endtask

  mode_state_e m;

  initial begin
    decision_valid = 0; decide_ooo = 0; pipe_empty = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_state(MS_OOO, "after reset");
    step(1, 1, 1); expect_state(MS_OOO, "OoO decision in OoO");
    step(1, 0, 0); expect_state(MS_DRAIN, "in-order decision starts drain");
    for (int i = 0; i < 5; i++) begin
      step(0, 0, 0); expect_state(MS_DRAIN, "drain waits for empty pipeline");
    end
    checks++; if (to_ino) begin failures++; $display("FAIL to_ino early"); end
    step(0, 0, 1); expect_state(MS_INO, "empty pipeline ends drain");
    checks++; if (!to_ino) begin failures++; $display("FAIL to_ino missing"); end
    step(1, 0, 0); expect_state(MS_INO, "in-order decision in in-order");
    step(1, 1, 0); expect_state(MS_OOO, "OoO decision switches at once");
    checks++; if (!to_ooo) begin failures++; $display("FAIL to_ooo missing"); end
    step(1, 0, 0); expect_state(MS_DRAIN, "second drain");
    step(1, 1, 1); expect_state(MS_OOO, "OoO decision cancels drain");
    // random phase against a model
    m = MS_OOO;
    for (int i = 0; i < 5000; i++) begin
      logic dv, d, pe;
      dv = ($urandom_range(0, 4) == 0); d = 1'($urandom); pe = ($urandom_range(0, 3) == 0);
      case (m)
        MS_OOO:   if (dv && !d) begin m = MS_DRAIN; n_drain++; end
        MS_DRAIN: if (dv && d) begin m = MS_OOO; n_cancel++; end else if (pe) begin m = MS_INO; n_ino++; end
        MS_INO:   if (dv && d) begin m = MS_OOO; n_ooo++; end
        default:  m = MS_OOO;
      endcase
      step(dv, d, pe);
      expect_state(m, "random");
    end
    checks++;
    if (n_drain == 0 || n_ino == 0 || n_ooo == 0 || n_cancel == 0) begin
      failures++; $display("FAIL random phase missed a transition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

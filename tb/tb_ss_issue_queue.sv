// tb_ss_issue_queue: self-checking test of the morphable issue queue.
// A testbench model keeps the queue as an ordered list. Every cycle random
// dispatch groups, wakeup broadcasts (from a small tag space, so that
// wakeups hit often), rare flushes and stretches of out-of-order and
// in-order mode are applied; the issued instructions, the ready counts, the
// head PC, the occupancy and disp_ready are compared with the model, which
// picks the oldest ready instructions (out-of-order) or the ready run at the
// head (in-order), at most four. It also counts cycles where in-order mode
// issued fewer instructions than out-of-order selection would have.
module tb_ss_issue_queue;
  import ss_pkg::*;
  localparam int unsigned DEPTH = 64, WIDTH = 4;

  logic clk = 0, rst_n = 0, flush;
  exec_mode_e mode;
  logic [WIDTH-1:0] disp_valid, wakeup_valid, issue_valid;
  iq_uop_t disp_uop [WIDTH];
  iq_uop_t issue_uop [WIDTH];
  tag_t wakeup_tag [WIDTH];
  logic disp_ready, head_valid, empty;
  logic [6:0] count, ready_cnt, head_ready_cnt;
  pc_t head_pc;
  int checks = 0, failures = 0;
  int n_full = 0, n_restricted = 0, n_wide = 0, n_flush = 0;

  ss_issue_queue #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .rst_n, .flush, .mode, .disp_valid, .disp_uop, .disp_ready,
    .wakeup_valid, .wakeup_tag, .issue_valid, .issue_uop, .count, .ready_cnt,
    .head_ready_cnt, .head_valid, .head_pc, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_uop_t mq [$];
  pc_t next_pc = 64'h1000;

  function automatic logic is_rdy(input iq_uop_t u);
    return u.src1_rdy && u.src2_rdy;
  endfunction

  function automatic iq_uop_t wake(input iq_uop_t u);
    automatic iq_uop_t r = u;
    for (int k = 0; k < WIDTH; k++)
      if (wakeup_valid[k]) begin
        if (wakeup_tag[k] == u.src1_tag) r.src1_rdy = 1;
        if (wakeup_tag[k] == u.src2_tag) r.src2_rdy = 1;
      end
    return r;
  endfunction

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, s);
  endtask

  int sel_idx [$];
  int unsigned mode_len;

  initial begin
    flush = 0; mode = EXEC_OOO; disp_valid = 0; wakeup_valid = 0; mode_len = 0;
    for (int s = 0; s < WIDTH; s++) begin disp_uop[s] = '0; wakeup_tag[s] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int unsigned e_ready, e_head, oo_cnt;
      logic run;
      // stimulus
      if (mode_len == 0) begin
        mode = exec_mode_e'($urandom_range(0, 1));
        mode_len = $urandom_range(20, 300);
      end
      mode_len--;
      flush = ($urandom_range(0, 999) == 0);
      for (int s = 0; s < WIDTH; s++) begin
        disp_valid[s] = ($urandom_range(0, 9) < 7);
        disp_uop[s].pc       = next_pc + 64'(4 * s);
        disp_uop[s].src1_tag = tag_t'($urandom_range(0, 15));
        disp_uop[s].src1_rdy = ($urandom_range(0, 2) == 0);
        disp_uop[s].src2_tag = tag_t'($urandom_range(0, 15));
        disp_uop[s].src2_rdy = ($urandom_range(0, 1) == 0);
        disp_uop[s].dst_tag  = tag_t'($urandom_range(0, 511));
        disp_uop[s].dst_vld  = 1'($urandom);
        wakeup_valid[s] = ($urandom_range(0, 5) == 0);
        wakeup_tag[s]   = tag_t'($urandom_range(0, 15));
      end
      #1;
      // expected selection and status from the model
      sel_idx.delete();
      e_ready = 0; e_head = 0; oo_cnt = 0; run = 1;
      foreach (mq[i]) begin
        automatic logic r = is_rdy(mq[i]);
        run = run && r;
        if (r) e_ready++;
        if (run) e_head++;
        if (r && oo_cnt < WIDTH) oo_cnt++;
        if (r && sel_idx.size() < WIDTH && (mode == EXEC_OOO || run)) sel_idx.push_back(i);
      end
      if (mode == EXEC_INO && sel_idx.size() < oo_cnt) n_restricted++;
      if (sel_idx.size() == WIDTH) n_wide++;
      checks++;
      if (count != 7'(mq.size()) || ready_cnt != 7'(e_ready) || head_ready_cnt != 7'(e_head) ||
          empty != (mq.size() == 0) || disp_ready != (mq.size() <= DEPTH - WIDTH) ||
          (mq.size() > 0 && (head_pc != mq[0].pc || !head_valid)))
        fail($sformatf("status count=%0d/%0d ready=%0d/%0d head=%0d/%0d", count, mq.size(),
                       ready_cnt, e_ready, head_ready_cnt, e_head));
      for (int s = 0; s < WIDTH; s++) begin
        checks++;
        if (s < sel_idx.size()) begin
          if (!issue_valid[s] || issue_uop[s] != mq[sel_idx[s]])
            fail($sformatf("issue slot %0d: pc %h expected %h", s, issue_uop[s].pc, mq[sel_idx[s]].pc));
        end else if (issue_valid[s]) fail($sformatf("issue slot %0d should be idle", s));
      end
      if (mq.size() > DEPTH - WIDTH) n_full++;
      // model update at the clock edge
      @(posedge clk);
      if (flush) begin
        mq.delete(); n_flush++;
      end else begin
        automatic iq_uop_t nq [$];
        automatic logic dr = (mq.size() <= DEPTH - WIDTH);
        automatic int k = 0;
        foreach (mq[i]) begin
          if (k < sel_idx.size() && sel_idx[k] == i) k++;
          else nq.push_back(wake(mq[i]));
        end
        if (dr) for (int s = 0; s < WIDTH; s++) if (disp_valid[s]) nq.push_back(wake(disp_uop[s]));
        mq = nq;
        if (dr) next_pc = next_pc + 64'(4 * WIDTH);
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_restricted == 0 || n_wide == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL coverage full=%0d restricted=%0d wide=%0d flush=%0d", n_full, n_restricted, n_wide, n_flush);
    end
    $display("coverage: full=%0d in-order-restricted=%0d four-wide=%0d flushes=%0d", n_full, n_restricted, n_wide, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

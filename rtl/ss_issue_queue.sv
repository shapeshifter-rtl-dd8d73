// ss_issue_queue: morphable issue queue of the ShapeShifter core.
//
// The queue keeps its instructions in program order: entry 0 is the oldest
// (the head) and valid entries are packed towards it. An instruction is
// ready when both source operands are ready. The same storage serves both
// execution modes, selected by `mode`:
//   EXEC_OOO - up to WIDTH ready instructions are issued per cycle, oldest
//              first, wherever they sit in the queue;
//   EXEC_INO - instructions are issued in strict program order: only the run
//              of ready entries that starts at the head, at most WIDTH long.
// Switching the mode needs no other action; the stored instructions simply
// continue under the other selection rule.
//
// For the decision logic the queue reports, every cycle, the number of ready
// instructions anywhere in it (`ready_cnt`, what out-of-order selection could
// pick) and the length of the ready run at its head (`head_ready_cnt`, what
// in-order selection could pick; not limited to WIDTH), together with the PC
// of the head entry. Their ratio is the instruction dispatch ratio (IDR).
//
// Interface and timing: issue is combinational from the registered queue
// contents (issue_valid/issue_uop in the cycle the instruction is picked).
// Dispatch is all-or-nothing: a group of up to WIDTH instructions is written
// in slot order at the tail when `disp_ready` (at least WIDTH free entries)
// is high, and can be picked one cycle later. Wakeup tags broadcast in a
// cycle set the matching source-ready bits of stored and of dispatching
// instructions for the next cycle. `flush` empties the queue. Reset is
// synchronous and active low.
// The program-ordered queue, the two selection rules and the ready counts
// come from the design; the collapsing organisation, the all-or-nothing
// dispatch, the tag wakeup and the flush are this implementation's choices.
module ss_issue_queue
  import ss_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_ENTRIES,
  parameter int unsigned WIDTH = MACHINE_WIDTH,
  localparam int unsigned CNT_BITS = $clog2(DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  exec_mode_e          mode,
  // dispatch
  input  logic [WIDTH-1:0]    disp_valid,
  input  iq_uop_t             disp_uop   [WIDTH],
  output logic                disp_ready,
  // wakeup from the execution units
  input  logic [WIDTH-1:0]    wakeup_valid,
  input  tag_t                wakeup_tag [WIDTH],
  // issue to the execution units
  output logic [WIDTH-1:0]    issue_valid,
  output iq_uop_t             issue_uop  [WIDTH],
  // status for the decision logic
  output logic [CNT_BITS-1:0] count,
  output logic [CNT_BITS-1:0] ready_cnt,
  output logic [CNT_BITS-1:0] head_ready_cnt,
  output logic                head_valid,
  output pc_t                 head_pc,
  output logic                empty
);

  iq_uop_t          q   [DEPTH];
  logic [DEPTH-1:0] vld;
  logic [DEPTH-1:0] rdy;
  logic [DEPTH-1:0] sel;

  iq_uop_t          q_n   [DEPTH];
  logic [DEPTH-1:0] vld_n;

  // Does a tag match one of this cycle's wakeup broadcasts?
  function automatic logic woken(input tag_t t, input logic [WIDTH-1:0] wv,
                                 input tag_t wt [WIDTH]);
    logic hit;
    hit = 1'b0;
    for (int k = 0; k < WIDTH; k++)
      if (wv[k] && wt[k] == t) hit = 1'b1;
    return hit;
  endfunction

  function automatic iq_uop_t apply_wakeup(input iq_uop_t u, input logic [WIDTH-1:0] wv,
                                           input tag_t wt [WIDTH]);
    iq_uop_t r;
    r = u;
    if (woken(u.src1_tag, wv, wt)) r.src1_rdy = 1'b1;
    if (woken(u.src2_tag, wv, wt)) r.src2_rdy = 1'b1;
    return r;
  endfunction

  // Readiness and status counts
  always_comb begin
    logic run;
    ready_cnt      = '0;
    head_ready_cnt = '0;
    run            = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      rdy[i] = vld[i] & q[i].src1_rdy & q[i].src2_rdy;
      if (rdy[i]) ready_cnt = ready_cnt + 1'b1;
      run = run & rdy[i];
      if (run) head_ready_cnt = head_ready_cnt + 1'b1;
    end
  end

  // Selection: oldest-first among the ready entries (OoO) or the ready run
  // at the head (in-order), at most WIDTH either way.
  always_comb begin
    int unsigned picked;
    logic        run;
    sel    = '0;
    picked = 0;
    run    = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      run = run & rdy[i];
      if (picked < WIDTH && rdy[i] && (mode == EXEC_OOO || run)) begin
        sel[i] = 1'b1;
        picked = picked + 1;
      end
    end
  end

  // Issue ports: the selected entries in age order
  always_comb begin
    int unsigned slot;
    slot        = 0;
    issue_valid = '0;
    for (int s = 0; s < WIDTH; s++) issue_uop[s] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (sel[i] && slot < WIDTH) begin
        issue_valid[slot] = 1'b1;
        issue_uop[slot]   = q[i];
        slot              = slot + 1;
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++)
      if (vld[i]) count = count + 1'b1;
  end

  assign empty      = ~vld[0];
  assign head_valid = vld[0];
  assign head_pc    = q[0].pc;
  assign disp_ready = (count <= CNT_BITS'(DEPTH - WIDTH));

  // Next state: collapse out the issued entries, then append the dispatch
  // group behind the survivors.
  always_comb begin
    int unsigned k;
    k = 0;
    for (int i = 0; i < DEPTH; i++) begin
      q_n[i]   = q[i];
      vld_n[i] = 1'b0;
    end
    for (int i = 0; i < DEPTH; i++) begin
      if (vld[i] && !sel[i]) begin
        q_n[k]   = apply_wakeup(q[i], wakeup_valid, wakeup_tag);
        vld_n[k] = 1'b1;
        k        = k + 1;
      end
    end
    if (disp_ready) begin
      for (int s = 0; s < WIDTH; s++) begin
        if (disp_valid[s] && k < DEPTH) begin
          q_n[k]   = apply_wakeup(disp_uop[s], wakeup_valid, wakeup_tag);
          vld_n[k] = 1'b1;
          k        = k + 1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush) begin
      vld <= '0;
    end else begin
      vld <= vld_n;
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
    end
  end

  // Valid entries stay packed towards the head.
  a_packed: assert property (@(posedge clk) disable iff (!rst_n)
    ((vld + 1'b1) & vld) == '0);
  // In-order mode never issues an entry whose elders are still waiting.
  a_inorder: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == EXEC_INO) |-> ((sel + 1'b1) & sel) == '0);

endmodule

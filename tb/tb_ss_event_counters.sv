// tb_ss_event_counters: self-checking test of the fetch and commit counters.
// Random increments of 0..4 per cycle for long enough to wrap the 16-bit
// counters; the counts are compared every cycle with a testbench model.
module tb_ss_event_counters;
  localparam int unsigned WIDTH = 4, CNT_W = 16;
  logic clk = 0, rst_n = 0;
  logic [2:0] fetch_inc, commit_inc;
  logic [CNT_W-1:0] fetch_count, commit_count;
  int unsigned mf, mc;
  int checks = 0, failures = 0;

  ss_event_counters #(.WIDTH(WIDTH), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .fetch_inc, .commit_inc, .fetch_count, .commit_count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_inc = 0; commit_inc = 0; mf = 0; mc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      fetch_inc  = 3'($urandom_range(0, WIDTH));
      commit_inc = 3'($urandom_range(0, WIDTH));
      @(posedge clk);
      mf = (mf + fetch_inc) % (1 << CNT_W);
      mc = (mc + commit_inc) % (1 << CNT_W);
      @(negedge clk);
      checks++;
      if (fetch_count != CNT_W'(mf) || commit_count != CNT_W'(mc)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %0d/%0d expected %0d/%0d", i, fetch_count, commit_count, mf, mc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ss_event_counters: running counts of fetched and committed instructions.
//
// The decision logic reads a fetch count and a commit count at the end of
// every decision period and subtracts the values it saw at the previous
// decision. These two counters keep those counts: each cycle they add the
// number of instructions the fetch stage brought in and the number the
// commit stage retired (0 to WIDTH each). They wrap modulo 2^CNT_W; as long
// as fewer than 2^CNT_W instructions pass in one decision period the
// wrapping subtraction still gives the right difference (a 10,000-cycle
// period of a 4-wide machine needs 16 bits).
//
// Interface and timing: counts are registered and include the increments
// of all earlier cycles. Reset clears them (synchronous, active low).
module ss_event_counters #(
  parameter int unsigned WIDTH = ss_pkg::MACHINE_WIDTH,
  parameter int unsigned CNT_W = ss_pkg::CNT_W,
  localparam int unsigned INC_W = $clog2(WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [INC_W-1:0] fetch_inc,
  input  logic [INC_W-1:0] commit_inc,
  output logic [CNT_W-1:0] fetch_count,
  output logic [CNT_W-1:0] commit_count
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fetch_count  <= '0;
      commit_count <= '0;
    end else begin
      fetch_count  <= fetch_count  + CNT_W'(fetch_inc);
      commit_count <= commit_count + CNT_W'(commit_inc);
    end
  end

endmodule

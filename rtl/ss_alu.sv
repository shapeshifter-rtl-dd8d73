// ss_alu: the single adder/subtractor/comparator of the decision logic.
//
// The decision logic needs additions (accumulating ready counts every
// sampling period), subtractions (fetch and commit counts over a decision
// period) and one comparison (S against the threshold alpha). Since these
// operations never happen in the same cycle, one unit serves them all,
// which follows the design's description of a single comparator used for
// subtraction, comparison and addition. A comparison is a subtraction whose
// borrow is read: with op = SUB, `borrow` is 1 exactly when a < b.
//
// Interface: purely combinational. op = 0 adds, op = 1 subtracts. `y` is
// the W-bit result (wrapping), `carry` is the carry out of an addition or
// the borrow of a subtraction, `zero` flags a zero result.
module ss_alu #(
  parameter int unsigned W = ss_pkg::FIX_W
) (
  input  logic         op,      // 0: a + b, 1: a - b
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         carry,   // carry out (add) or borrow (sub)
  output logic         zero
);

  logic [W:0] sum;

  // One adder: subtraction adds the one's complement of b plus one.
  always_comb begin
    sum   = {1'b0, a} + {1'b0, (op ? ~b : b)} + (W+1)'(op);
    y     = sum[W-1:0];
    carry = op ? ~sum[W] : sum[W];
    zero  = (y == '0);
  end

endmodule

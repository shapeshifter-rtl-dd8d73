// tb_ss_divider: self-checking test of the pipelined fixed-point divider.
// Divisions are started on random cycles, often back to back, with random
// tags. Every result must come out exactly QW = 24 cycles after it went in,
// in order, with its tag, and equal floor((num << 8) / den) computed here;
// a zero divisor must give an all-ones quotient.
module tb_ss_divider;
  localparam int unsigned NUM_W = 16, DEN_W = 16, FRAC = 8, QW = NUM_W + FRAC;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic in_tag, out_tag;
  logic [QW-1:0] quot;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  typedef struct { longint unsigned q; logic tag; int unsigned due; } exp_t;
  exp_t exp_q [$];

  ss_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .FRAC(FRAC), .TAG_W(1)) dut (
    .clk, .rst_n, .in_valid, .num, .den, .in_tag, .out_valid, .quot, .out_tag);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = exp_q.pop_front();
        if (quot !== e.q[QW-1:0] || out_tag !== e.tag || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL q=%0d tag=%0d cycle=%0d expected %0d %0d %0d", quot, out_tag, cycle, e.q, e.tag, e.due);
        end
      end
    end
  end

  initial begin
    in_valid = 0; num = 0; den = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_tag   = 1'($urandom);
      case (i % 4)
        0: begin num = NUM_W'($urandom_range(0, 6400)); den = DEN_W'($urandom_range(0, 1600)); end
        1: begin num = NUM_W'($urandom_range(0, 40000)); den = DEN_W'($urandom_range(0, 40000)); end
        2: begin num = NUM_W'($urandom); den = DEN_W'($urandom_range(1, 3)); end
        default: begin num = NUM_W'($urandom); den = DEN_W'($urandom); end
      endcase
      if (i == 5) begin num = 0; den = 0; end
      if (i == 6) begin num = 100; den = 0; end
      if (i == 7) begin num = 300; den = 100; end
      if (in_valid) begin
        e.q   = (den == 0) ? (64'd1 << QW) - 1 : ((longint'(num) << FRAC) / longint'(den));
        e.tag = in_tag;
        e.due = cycle + QW;
        exp_q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (QW + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

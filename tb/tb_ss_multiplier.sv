// tb_ss_multiplier: self-checking test of the fixed-point multiplier.
// Random operands (small, mixed and large enough to saturate) are fed one
// per cycle; each product must appear exactly one cycle later and equal
// (a * b) >> 8, saturated to 24 bits, computed here with 64-bit integers.
module tb_ss_multiplier;
  localparam int unsigned W = 24, FRAC = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [W-1:0] a, b, prod;
  int checks = 0, failures = 0;
  longint unsigned exp_q [$];

  ss_multiplier #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .prod);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned model(input longint unsigned x, input longint unsigned y);
    longint unsigned p;
    p = (x * y) >> FRAC;
    return (p > (64'd1 << W) - 1) ? (64'd1 << W) - 1 : p;
  endfunction

  // checker: every valid output matches the oldest expectation, and it
  // arrives one cycle after its input
  logic pend;
  always @(posedge clk) if (rst_n) begin
    if (pend !== out_valid) begin
      failures++; checks++;
      $display("FAIL latency: out_valid=%0d expected %0d", out_valid, pend);
    end
    if (out_valid) begin
      longint unsigned e;
      e = exp_q.pop_front();
      checks++;
      if (prod !== e[W-1:0]) begin
        failures++;
        $display("FAIL prod=%0d exp=%0d", prod, e);
      end
    end
    pend <= in_valid;
  end

  initial begin
    pend = 0; in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      case (i % 3)
        0: begin a = W'($urandom_range(0, 64 << FRAC)); b = W'($urandom_range(0, 1 << FRAC)); end
        1: begin a = W'($urandom); b = W'($urandom_range(0, 4 << FRAC)); end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      if (i == 0) begin a = 24'h000300; b = 24'h000100; end   // 3.0 * 1.0
      if (i == 1) begin a = '1; b = '1; end                   // saturates
      if (in_valid) exp_q.push_back(model(a, b));
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d products missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

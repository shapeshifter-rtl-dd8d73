// tb_ss_alu: self-checking test of the shared add/subtract/compare unit.
// Random and corner operands for both operations; results, carry/borrow and
// the zero flag are compared with integer arithmetic done in the testbench.
module tb_ss_alu;
  localparam int unsigned W = 24;
  logic         op;
  logic [W-1:0] a, b, y;
  logic         carry, zero;
  int checks = 0, failures = 0;

  ss_alu #(.W(W)) dut (.op, .a, .b, .y, .carry, .zero);

  task automatic check_one(input logic o, input logic [W-1:0] x, input logic [W-1:0] z);
    longint unsigned ex, ey;
    logic ec;
    op = o; a = x; b = z;
    #1;
    if (!o) begin
      ex = longint'(x) + longint'(z);
      ey = ex & ((64'd1 << W) - 1);
      ec = ex[W];
    end else begin
      ey = (longint'(x) - longint'(z)) & ((64'd1 << W) - 1);
      ec = (x < z);
    end
    checks++;
    if (y !== ey[W-1:0] || carry !== ec || zero !== (ey == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%0d b=%0d y=%0d c=%0d z=%0d exp %0d %0d", o, x, z, y, carry, zero, ey, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(1'b1, 24'd768, 24'd769);    // alpha < S: borrow
    check_one(1'b1, 24'd768, 24'd768);    // alpha == S: no borrow, zero
    check_one(1'b1, 24'd768, 24'd767);
    check_one(1'b0, '1, 24'd1);           // carry out
    check_one(1'b0, 24'd0, 24'd0);
    for (int i = 0; i < 2000; i++)
      check_one(1'($urandom), W'($urandom), W'($urandom));
    for (int i = 0; i < 500; i++)
      check_one(1'b1, W'($urandom_range(0, 2000)), W'($urandom_range(0, 2000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

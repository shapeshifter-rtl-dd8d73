// ss_multiplier: fixed-point multiplier computing the speedup S = IDR * CFR.
//
// Both operands and the product are unsigned numbers with FRAC fraction
// bits. The full product is shifted right by FRAC and saturates at the
// largest W-bit value, so a very large IDR cannot wrap round into a small S.
//
// Interface and timing: operands are registered on the clock edge where
// in_valid is high; out_valid and prod follow one cycle later. The design
// names a multiplication circuit for S; the format, the saturation and the
// one-cycle latency are this implementation's choices.
module ss_multiplier #(
  parameter int unsigned W    = ss_pkg::FIX_W,
  parameter int unsigned FRAC = ss_pkg::FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W-1:0] prod
);

  logic [2*W-1:0] full;
  logic [2*W-1:0] scaled;
  logic [W-1:0]   sat;

  always_comb begin
    full   = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    scaled = full >> FRAC;
    sat    = (scaled[2*W-1:W] != '0) ? '1 : scaled[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prod      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) prod <= sat;
    end
  end

endmodule

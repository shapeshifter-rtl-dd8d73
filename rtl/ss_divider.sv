// ss_divider: pipelined fixed-point divider for the IDR and CFR ratios.
//
// Computes q = (num << FRAC) / den with unsigned restoring division, one
// quotient bit per pipeline stage, so a new division can start every cycle
// and its result appears QW = NUM_W + FRAC cycles later. The two divisions
// of a decision (IDR and CFR) are started back to back and share the unit.
// A tag travels with each operation so the caller can tell the results
// apart. Dividing by zero gives an all-ones quotient (the largest ratio);
// the caller decides what 0/0 means.
//
// Interface: in_valid/num/den/in_tag are taken on a rising clock edge;
// out_valid/quot/out_tag are registered and valid QW cycles later. The
// design calls for a pipelined divider; its stage count, the restoring
// algorithm and the fixed-point format are this implementation's choices.
module ss_divider #(
  parameter int unsigned NUM_W = ss_pkg::CNT_W,
  parameter int unsigned DEN_W = ss_pkg::CNT_W,
  parameter int unsigned FRAC  = ss_pkg::FRAC_W,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned QW   = NUM_W + FRAC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [QW-1:0]    quot,
  output logic [TAG_W-1:0] out_tag
);

  // Pipeline state after stage s: partial remainder, the dividend bits not
  // yet consumed (shifted left), the divisor, the quotient bits so far.
  typedef struct packed {
    logic             vld;
    logic [DEN_W:0]   rem;
    logic [QW-1:0]    dvd;
    logic [DEN_W-1:0] den;
    logic [QW-1:0]    q;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [QW+1];

  // One restoring step: bring in the next dividend bit, subtract the
  // divisor if it fits.
  function automatic stage_t step(input stage_t s);
    stage_t     r;
    logic [DEN_W+1:0] trial;
    logic [DEN_W+1:0] shifted;
    r       = s;
    shifted = {s.rem, s.dvd[QW-1]};
    trial   = shifted - {2'b00, s.den};
    r.dvd   = s.dvd << 1;
    if (!trial[DEN_W+1] || s.den == '0) begin
      r.rem = trial[DEN_W:0];
      r.q   = {s.q[QW-2:0], 1'b1};
    end else begin
      r.rem = shifted[DEN_W:0];
      r.q   = {s.q[QW-2:0], 1'b0};
    end
    return r;
  endfunction

  always_comb begin
    st[0].vld = in_valid;
    st[0].rem = '0;
    st[0].dvd = {num, {FRAC{1'b0}}};
    st[0].den = den;
    st[0].q   = '0;
    st[0].tag = in_tag;
  end

  for (genvar s = 0; s < QW; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) st[s+1] <= '0;
      else        st[s+1] <= step(st[s]);
    end
  end

  assign out_valid = st[QW].vld;
  assign quot      = st[QW].q;
  assign out_tag   = st[QW].tag;

endmodule

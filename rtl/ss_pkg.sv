// ss_pkg: types and constants shared by the ShapeShifter mode-switching logic.
//
// The machine sizes follow the simulated core of the design: a 4-wide
// machine with a 64-entry issue queue and 256 integer plus 256 floating-point
// physical registers (so a physical register tag of 9 bits). The statistics
// are 16-bit counts, which is enough for a 10,000-cycle decision period of a
// 4-wide machine (at most 40,000 fetched instructions), and every ratio
// (IDR, CFR, S and the threshold alpha) is an unsigned fixed-point number
// with 8 fraction bits. The 64-bit program counter, the 16-bit counts and
// the 8-bit fraction are this design's own choices.
package ss_pkg;

  // Machine shape
  localparam int unsigned MACHINE_WIDTH = 4;     // instructions per cycle
  localparam int unsigned IQ_ENTRIES    = 64;    // issue queue size
  localparam int unsigned PC_W          = 64;    // program counter width
  localparam int unsigned TAG_W         = 9;     // 512 physical registers

  // Periods of the decision logic, in cycles
  localparam int unsigned SAMPLE_PERIOD   = 100;
  localparam int unsigned DECISION_PERIOD = 10000;

  // Arithmetic of the decision logic
  localparam int unsigned CNT_W  = 16;           // counts and accumulators
  localparam int unsigned FRAC_W = 8;            // fraction bits of ratios
  localparam int unsigned FIX_W  = CNT_W + FRAC_W;

  // Threshold used as the main configuration: alpha = 3.0
  localparam logic [FIX_W-1:0] ALPHA_DEFAULT = FIX_W'(3) << FRAC_W;

  typedef logic [PC_W-1:0]  pc_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [FIX_W-1:0] fix_t;

  // How the issue queue picks instructions
  typedef enum logic {
    EXEC_OOO = 1'b0,   // any ready instruction, oldest first
    EXEC_INO = 1'b1    // only the ready run starting at the oldest entry
  } exec_mode_e;

  // State of the mode controller
  typedef enum logic [1:0] {
    MS_OOO   = 2'd0,   // out-of-order execution
    MS_DRAIN = 2'd1,   // fetch throttled, window draining towards in-order
    MS_INO   = 2'd2    // in-order execution
  } mode_state_e;

  // One renamed instruction waiting in the issue queue
  typedef struct packed {
    pc_t  pc;
    tag_t src1_tag;
    logic src1_rdy;
    tag_t src2_tag;
    logic src2_rdy;
    tag_t dst_tag;
    logic dst_vld;
  } iq_uop_t;

endpackage

// pc_pkg: constants and types shared by the packet classifier.
//
// The classifier evaluates a rule-set on the 104-bit IP 5-tuple (13 bytes:
// source address, destination address, protocol, source port, destination
// port, in that order). The rule-set is split into N_UNITS subsets; each
// subset is a multi-valued decision diagram held in a pipeline of SRAM banks
// that reads the (byte-permuted) header ROOT_BITS bits first and then STRIDE
// bits per bank. The numbers below are the main configuration of the design:
// 10 units, 1024 nodes per level, 4 header bits per level after the first 8,
// hence 24 banks of 1024 x 16 words per unit.
//
// The widths of the action code and of the priority are not fixed by the
// architecture; 8-bit actions and 14-bit priorities (enough to number 10,000
// rules) are this design's choice.
package pc_pkg;

  localparam int unsigned HDR_BYTES = 13;
  localparam int unsigned HDR_W     = HDR_BYTES * 8;   // 104
  localparam int unsigned N_UNITS   = 10;
  localparam int unsigned ROOT_BITS = 8;
  localparam int unsigned STRIDE    = 4;
  localparam int unsigned NODES     = 1024;
  localparam int unsigned PTR_W     = $clog2(NODES);   // 10
  localparam int unsigned LEVELS    = (HDR_W - ROOT_BITS) / STRIDE;  // 24
  localparam int unsigned ACTION_W  = 8;
  localparam int unsigned PRIO_W    = 14;
  localparam int unsigned SEL_W     = $clog2(HDR_BYTES); // 4
  localparam int unsigned UNIT_W    = $clog2(N_UNITS);   // 4
  localparam int unsigned LVL_W     = $clog2(LEVELS);    // 5
  localparam int unsigned ADDR_W    = PTR_W + STRIDE;    // 14

  // A terminal of a decision diagram: the action of the best rule that
  // matched in one subset and that rule's priority (larger wins).
  typedef struct packed {
    logic [ACTION_W-1:0] action;
    logic [PRIO_W-1:0]   prio;
  } match_t;

  localparam int unsigned MATCH_W = $bits(match_t);    // 22
  localparam int unsigned WDATA_W = (MATCH_W > PTR_W) ? MATCH_W : PTR_W;

  // What a configuration write from the control processor changes.
  typedef enum logic [0:0] {
    UPD_NODE = 1'b0,   // a word of a node memory (stalls the lookup pipeline)
    UPD_PERM = 1'b1    // the source byte of one output of a permutation network
  } upd_target_e;

  // One write command. For UPD_NODE, level and addr pick the word, data
  // holds a child pointer (levels 0..LEVELS-2) or a match_t (last level).
  // For UPD_PERM, addr holds the output byte index, data the source byte.
  typedef struct packed {
    logic                valid;
    upd_target_e         target;
    logic [UNIT_W-1:0]   unit;
    logic [LVL_W-1:0]    level;
    logic [ADDR_W-1:0]   addr;
    logic [WDATA_W-1:0]  data;
  } upd_t;

endpackage

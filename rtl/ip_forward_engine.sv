// ip_forward_engine: longest-prefix-match IP forwarding by a binary decision
// diagram evaluated in a pipeline of SRAM banks.
//
// The forwarding function maps the 32-bit destination address to the output
// port of the longest matching prefix. Its decision diagram, with one level
// per address bit and no skipped levels, is stored level by level in 32
// banks; bank l is addressed by {pointer from bank l-1, address bit l} and
// the last bank holds port numbers (Figure 1 style slices). Each bank is
// provisioned for 2^14 = 16384 nodes, the first power of two above the
// 16000 nodes per level the design budgets for, i.e. 2^15 words of 14 bits
// (under 64 KB per bank). The 8-bit port number is this design's choice.
//
// STRIDE (default 1) reads that many address bits per bank, which collapses
// groups of binary levels into one multi-valued level: STRIDE = 4 gives an
// 8-bank pipeline whose nodes hold 16 pointers. Only a uniform grouping is
// supported; a grouping with a different width per bank, chosen for the
// table being loaded, is not.
//
// Updates: the control processor sends single-word writes (upd_level,
// upd_addr, upd_data); each write stalls lookups for its cycle (in_ready
// low), as in the single-engine update scheme.
//
// Interface and timing: a destination address is taken when in_valid and
// in_ready are high; out_valid/out_port follow LEVELS = ADDR_BITS/STRIDE
// (32 by default) cycles later, plus stall cycles, one per clock at full
// rate. A write addresses word {node, STRIDE address bits} of bank upd_level.
module ip_forward_engine #(
  parameter int unsigned ADDR_BITS = 32,
  parameter int unsigned PTR_W     = 14,
  parameter int unsigned PORT_W    = 8,
  parameter int unsigned STRIDE    = 1,
  localparam int unsigned LEVELS   = ADDR_BITS / STRIDE,
  localparam int unsigned LVL_W    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned WA_W     = PTR_W + STRIDE,
  localparam int unsigned WD_W     = (PTR_W > PORT_W) ? PTR_W : PORT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [ADDR_BITS-1:0] in_dst_ip,
  input  logic                 upd_valid,
  input  logic [LVL_W-1:0]     upd_level,
  input  logic [WA_W-1:0]      upd_addr,
  input  logic [WD_W-1:0]      upd_data,
  output logic                 out_valid,
  output logic [PORT_W-1:0]    out_port
);

  logic stall;
  assign stall    = upd_valid;
  assign in_ready = !stall;

  bdd_pipeline #(
    .KEY_W     (ADDR_BITS),
    .ROOT_BITS (0),
    .STRIDE    (STRIDE),
    .PTR_W     (PTR_W),
    .RES_W     (PORT_W)
  ) u_pipe (
    .clk        (clk),
    .rst_n      (rst_n),
    .stall      (stall),
    .in_valid   (in_valid && in_ready),
    .in_key     (in_dst_ip),
    .wr_en      (upd_valid),
    .wr_level   (upd_level),
    .wr_addr    (upd_addr),
    .wr_data    (upd_data),
    .out_valid  (out_valid),
    .out_result (out_port)
  );

endmodule

// bdd_pipeline: evaluates one decision diagram on a key by walking it top
// down through a pipeline of SRAM banks, one bank per level.
//
// How it works: the diagram keeps every level (a node whose two children
// are equal is not skipped), so a walk visits exactly one node per level.
// Bank l holds the nodes of level l; the word at address {node, bits} is
// the pointer to the child reached when the next STRIDE key bits equal
// `bits`. The data out of bank l, together with the next STRIDE key bits,
// forms the address of bank l+1. The last bank holds terminal values
// (RES_W bits) instead of pointers. The first ROOT_BITS key bits are taken
// directly as the node pointer of bank 0 (the top of the diagram is a full
// tree over them); with ROOT_BITS = 0 the walk starts at node 0. Key bits
// are consumed most significant first. The key bits not yet consumed travel
// beside the pointers in pipeline registers, so a new key can enter on every
// clock: there are no hazards.
//
// Defaults: the classifier configuration (104-bit key, 8 root bits, 4 bits
// per level, 1024 nodes, 24 banks). STRIDE = 1, ROOT_BITS = 0 gives the
// binary-decision-diagram engine of Figure 1 of the architecture.
//
// Interface and timing:
//   in_valid/in_key  a key, taken on a clock edge at which stall is low.
//   out_valid/out_result  the terminal, LEVELS cycles after the key was
//                    taken (one cycle per bank). out_valid is a one-cycle
//                    pulse per key.
//   stall            holds every bank and pipeline register; the caller
//                    drives it while a write is made and must not offer keys
//                    then.
//   wr_en/wr_level/wr_addr/wr_data  writes one word of one bank (low RES_W
//                    or PTR_W bits of wr_data are used). Only allowed with
//                    stall high, since the banks are single-ported.
module bdd_pipeline #(
  parameter int unsigned KEY_W     = 104,
  parameter int unsigned ROOT_BITS = 8,
  parameter int unsigned STRIDE    = 4,
  parameter int unsigned PTR_W     = 10,
  parameter int unsigned RES_W     = 22,
  localparam int unsigned LEVELS   = (KEY_W - ROOT_BITS) / STRIDE,
  localparam int unsigned ADDR_W   = PTR_W + STRIDE,
  localparam int unsigned LVL_W    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned WD_W     = (PTR_W > RES_W) ? PTR_W : RES_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  input  logic              wr_en,
  input  logic [LVL_W-1:0]  wr_level,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WD_W-1:0]   wr_data,
  output logic              out_valid,
  output logic [RES_W-1:0]  out_result
);

  // Pointer into bank 0: the root bits, or node 0.
  logic [PTR_W-1:0] root_ptr;
  if (ROOT_BITS > 0) begin : g_root
    assign root_ptr = PTR_W'(in_key[KEY_W-1 -: ROOT_BITS]);
  end else begin : g_noroot
    assign root_ptr = '0;
  end

  // Key with the root bits removed, consumed from the top STRIDE bits down.
  logic [KEY_W-1:0] key0;
  assign key0 = in_key << ROOT_BITS;

  // Per level: the key bits still to be consumed after this bank, the
  // valid bit and the bank's read data.
  logic [KEY_W-1:0]  key_q [LEVELS];
  logic              v_q   [LEVELS];
  logic [PTR_W-1:0]  ptr_d [LEVELS];   // data out of banks 0..LEVELS-2
  logic              adv_q;            // the last edge advanced the pipeline

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    logic [PTR_W-1:0]  ptr_in;
    logic [STRIDE-1:0] bits_in;
    logic [KEY_W-1:0]  key_in;
    logic              v_in;
    logic              wsel;

    if (l == 0) begin : g_first
      assign ptr_in  = root_ptr;
      assign key_in  = key0;
      assign v_in    = in_valid;
    end else begin : g_next
      assign ptr_in  = ptr_d[l-1];
      assign key_in  = key_q[l-1];
      assign v_in    = v_q[l-1];
    end
    assign bits_in = key_in[KEY_W-1 -: STRIDE];
    assign wsel    = wr_en && (wr_level == LVL_W'(l));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[l]   <= 1'b0;
        key_q[l] <= '0;
      end else if (!stall) begin
        v_q[l]   <= v_in;
        key_q[l] <= key_in << STRIDE;
      end
    end

    if (l < LEVELS - 1) begin : g_ptr_bank
      node_sram #(.ADDR_W(ADDR_W), .DATA_W(PTR_W)) u_bank (
        .clk   (clk),
        .en    (wsel || !stall),
        .we    (wsel),
        .addr  (wsel ? wr_addr : {ptr_in, bits_in}),
        .wdata (wr_data[PTR_W-1:0]),
        .rdata (ptr_d[l])
      );
    end else begin : g_leaf_bank
      node_sram #(.ADDR_W(ADDR_W), .DATA_W(RES_W)) u_bank (
        .clk   (clk),
        .en    (wsel || !stall),
        .we    (wsel),
        .addr  (wsel ? wr_addr : {ptr_in, bits_in}),
        .wdata (wr_data[RES_W-1:0]),
        .rdata (out_result)
      );
      assign ptr_d[l] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) adv_q <= 1'b0;
    else        adv_q <= !stall;
  end

  assign out_valid = v_q[LEVELS-1] && adv_q;

  // The banks are single-ported: a write is only legal while stalled, and
  // the key must leave no bits unconsumed.
  initial assert (ROOT_BITS + LEVELS * STRIDE == KEY_W)
    else $error("KEY_W - ROOT_BITS must be a multiple of STRIDE");
  initial assert (ROOT_BITS <= PTR_W)
    else $error("ROOT_BITS must fit in a node pointer");

  a_write_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> stall) else $error("node write without stall");
  a_write_level: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> int'(wr_level) < LEVELS) else $error("write to a missing level");

endmodule

// packet_classifier: multi-field packet classification by a set of
// partitioned decision diagrams.
//
// The rule-set is split off-line into N_UNITS subsets, each chosen so that
// its classification function has a small decision diagram under a variable
// order of its own. Each unit is a byte permutation network, which puts the
// header bytes in that unit's order, followed by an SRAM pipeline that walks
// the unit's diagram and returns the best matching rule of the subset with
// its priority. A priority encoder then keeps the overall best match.
// Everything is a hazard-free pipeline: one header enters per clock.
//
// Configuration (node words and permutation selects) comes as write
// commands (upd_t) from an external control processor. A node write
// occupies the single port of one bank, so while upd.valid is high with
// target UPD_NODE every unit stalls and in_ready is low. Permutation writes
// do not stall.
//
// Interface and timing:
//   in_valid/in_ready/in_hdr  104-bit 5-tuple, taken when both are high.
//   out_valid/out_match/out_unit  final action and priority, and which unit
//       produced it, 1 (permutation) + LEVELS (banks) + 4 (encoder) = 29
//       cycles after the header was taken, plus any stall cycles.
//   upd  one write command per cycle.
module packet_classifier
  import pc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [HDR_W-1:0]  in_hdr,
  input  upd_t              upd,
  output logic              out_valid,
  output match_t            out_match,
  output logic [UNIT_W-1:0] out_unit
);

  logic   stall;
  logic   take;
  logic   unit_vld [N_UNITS];
  match_t unit_res [N_UNITS];

  assign stall    = upd.valid && (upd.target == UPD_NODE);
  assign in_ready = !stall;
  assign take     = in_valid && in_ready;

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    logic             perm_vld;
    logic [HDR_W-1:0] perm_hdr;
    logic             sel_unit;
    logic [MATCH_W-1:0] res;

    assign sel_unit = upd.valid && (upd.unit == UNIT_W'(u));

    byte_perm_net #(.N_BYTES(HDR_BYTES)) u_perm (
      .clk       (clk),
      .rst_n     (rst_n),
      .stall     (stall),
      .cfg_we    (sel_unit && (upd.target == UPD_PERM)),
      .cfg_idx   (upd.addr[SEL_W-1:0]),
      .cfg_sel   (upd.data[SEL_W-1:0]),
      .in_valid  (take),
      .in_hdr    (in_hdr),
      .out_valid (perm_vld),
      .out_hdr   (perm_hdr)
    );

    bdd_pipeline #(
      .KEY_W     (HDR_W),
      .ROOT_BITS (ROOT_BITS),
      .STRIDE    (STRIDE),
      .PTR_W     (PTR_W),
      .RES_W     (MATCH_W)
    ) u_pipe (
      .clk        (clk),
      .rst_n      (rst_n),
      .stall      (stall),
      .in_valid   (perm_vld),
      .in_key     (perm_hdr),
      .wr_en      (sel_unit && (upd.target == UPD_NODE)),
      .wr_level   (upd.level),
      .wr_addr    (upd.addr),
      .wr_data    (upd.data),
      .out_valid  (unit_vld[u]),
      .out_result (res)
    );
    assign unit_res[u] = match_t'(res);
  end

  prio_encoder #(.N_IN(N_UNITS)) u_prio (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (unit_vld[0]),
    .in_match  (unit_res),
    .out_valid (out_valid),
    .out_match (out_match),
    .out_unit  (out_unit)
  );

  // All units share one stall and one depth, so their results line up.
  for (genvar u = 1; u < N_UNITS; u++) begin : g_step
    a_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      unit_vld[u] == unit_vld[0]) else $error("units out of step");
  end

endmodule

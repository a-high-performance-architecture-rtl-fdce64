// pbdd_top: the two engines of the SRAM-pipeline architecture side by side.
//
//   * packet_classifier: the multi-field classifier (10 units of permutation
//     network + 24-bank decision-diagram pipeline, and a priority encoder)
//     on the 104-bit 5-tuple.
//   * ip_forward_engine: the single-field case, longest-prefix IP forwarding
//     with a 32-bank binary decision-diagram pipeline.
//
// The two share only clock and reset; each has its own lookup port and its
// own configuration-write port, which an external control processor drives.
// Timing is that of the two engines (29 and 32 cycles of latency, one
// lookup per clock each, stalled only by node writes).
module pbdd_top
  import pc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // multi-field classifier
  input  logic              cls_in_valid,
  output logic              cls_in_ready,
  input  logic [HDR_W-1:0]  cls_in_hdr,
  input  upd_t              cls_upd,
  output logic              cls_out_valid,
  output match_t            cls_out_match,
  output logic [UNIT_W-1:0] cls_out_unit,
  // IP forwarding
  input  logic              fwd_in_valid,
  output logic              fwd_in_ready,
  input  logic [31:0]       fwd_in_dst_ip,
  input  logic              fwd_upd_valid,
  input  logic [4:0]        fwd_upd_level,
  input  logic [14:0]       fwd_upd_addr,
  input  logic [13:0]       fwd_upd_data,
  output logic              fwd_out_valid,
  output logic [7:0]        fwd_out_port
);

  packet_classifier u_cls (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cls_in_valid),
    .in_ready  (cls_in_ready),
    .in_hdr    (cls_in_hdr),
    .upd       (cls_upd),
    .out_valid (cls_out_valid),
    .out_match (cls_out_match),
    .out_unit  (cls_out_unit)
  );

  ip_forward_engine u_fwd (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (fwd_in_valid),
    .in_ready  (fwd_in_ready),
    .in_dst_ip (fwd_in_dst_ip),
    .upd_valid (fwd_upd_valid),
    .upd_level (fwd_upd_level),
    .upd_addr  (fwd_upd_addr),
    .upd_data  (fwd_upd_data),
    .out_valid (fwd_out_valid),
    .out_port  (fwd_out_port)
  );

endmodule

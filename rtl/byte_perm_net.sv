// byte_perm_net: reorders the header bytes in front of one decision-diagram
// pipeline, so that each unit can read the header in its own variable order.
//
// Reordering is restricted to whole bytes: the 5-tuple is N_BYTES = 13
// bytes, and output byte j is input byte sel[j]. Each output is a tree of
// 2-input multiplexers with SEL_W = 4 stages, stage s steered by bit s of
// sel[j]; inputs beyond N_BYTES-1 read as zero. The tree shape (one 13-to-1
// selector per output, which also allows mappings that are not
// permutations) is this design's choice; the byte width, the 13 x 13 size
// and the four multiplexer stages are the architecture's.
//
// Bytes are numbered from the most significant end: byte 0 is
// in_hdr[8*N_BYTES-1 -: 8], the first byte the pipeline reads.
//
// Interface and timing: cfg_we writes sel[cfg_idx] = cfg_sel on a clock
// edge. After reset sel is the identity. The permuted header is registered:
// out_valid/out_hdr follow in_valid/in_hdr by one cycle. With stall high the
// output register holds.
module byte_perm_net #(
  parameter int unsigned N_BYTES = 13,
  localparam int unsigned SEL_W  = $clog2(N_BYTES),
  localparam int unsigned W      = 8 * N_BYTES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stall,
  input  logic             cfg_we,
  input  logic [SEL_W-1:0] cfg_idx,
  input  logic [SEL_W-1:0] cfg_sel,
  input  logic             in_valid,
  input  logic [W-1:0]     in_hdr,
  output logic             out_valid,
  output logic [W-1:0]     out_hdr
);

  logic [SEL_W-1:0] sel [N_BYTES];
  logic [7:0]       in_byte [2**SEL_W];
  logic [W-1:0]     perm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_BYTES; j++) sel[j] <= SEL_W'(j);
    end else if (cfg_we && int'(cfg_idx) < N_BYTES) begin
      sel[cfg_idx] <= cfg_sel;
    end
  end

  always_comb begin
    for (int i = 0; i < 2**SEL_W; i++)
      in_byte[i] = (i < N_BYTES) ? in_hdr[W-1-8*i -: 8] : 8'h00;
  end

  for (genvar j = 0; j < N_BYTES; j++) begin : g_out
    // stage[s] holds 2^(SEL_W-s) candidates; stage s+1 halves them.
    logic [7:0] stage [SEL_W+1][2**SEL_W];
    always_comb begin
      for (int i = 0; i < 2**SEL_W; i++) stage[0][i] = in_byte[i];
      for (int s = 0; s < SEL_W; s++) begin
        for (int i = 0; i < 2**SEL_W; i++) stage[s+1][i] = 8'h00;
        for (int i = 0; i < 2**(SEL_W-s-1); i++)
          stage[s+1][i] = sel[j][s] ? stage[s][2*i+1] : stage[s][2*i];
      end
    end
    assign perm[W-1-8*j -: 8] = stage[SEL_W][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hdr   <= '0;
    end else if (!stall) begin
      out_valid <= in_valid;
      out_hdr   <= perm;
    end
  end

endmodule

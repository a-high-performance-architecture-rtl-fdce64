// prio_encoder: merges the results of the decision-diagram units into the
// final classification, keeping the match of highest priority.
//
// Every unit reports a match (each subset holds a default rule, so there
// always is one) as an action and its priority. The encoder is a pipelined
// tree of pairwise comparators: with N_IN = 10 inputs, padded to 16, it has
// $clog2(N_IN) = 4 stages, each ending in a register. A larger priority
// value wins; on equal priorities the lower-numbered unit wins. Padding
// entries never win. Both tie-break and the "larger wins" sense are this
// design's choices; the four stages for ten units are the architecture's.
//
// Interface and timing: in_valid qualifies all in_match entries together.
// out_valid/out_match/out_unit (index of the winning unit) follow after
// STAGES clock cycles. The encoder is not stalled: the units in front of it
// deliver each result as a single valid pulse.
module prio_encoder
  import pc_pkg::*;
#(
  parameter int unsigned N_IN   = 10,
  localparam int unsigned STAGES = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned IDX_W  = STAGES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  match_t           in_match [N_IN],
  output logic             out_valid,
  output match_t           out_match,
  output logic [IDX_W-1:0] out_unit
);

  localparam int unsigned N_PAD = 2**STAGES;

  typedef struct packed {
    logic             real_in;   // a unit's result, not padding
    logic [IDX_W-1:0] idx;
    match_t           m;
  } cand_t;

  // Candidate a beats candidate b (a is the lower-numbered one).
  function automatic cand_t pick(cand_t a, cand_t b);
    if (!b.real_in)                     return a;
    if (!a.real_in)                     return b;
    if (a.m.prio >= b.m.prio)           return a;
    return b;
  endfunction

  cand_t lvl0 [N_PAD];
  always_comb begin
    for (int i = 0; i < N_PAD; i++) begin
      lvl0[i] = '0;
      if (i < N_IN) begin
        lvl0[i].real_in = 1'b1;
        lvl0[i].idx     = IDX_W'(i);
        lvl0[i].m       = in_match[i];
      end
    end
  end

  // tree[s] holds the N_PAD >> s candidates after s registered stages.
  cand_t tree  [STAGES+1][N_PAD];
  logic  vld   [STAGES+1];

  always_comb begin
    tree[0] = lvl0;
    vld[0]  = in_valid;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[s+1] <= 1'b0;
        for (int i = 0; i < N_PAD; i++) tree[s+1][i] <= '0;
      end else begin
        vld[s+1] <= vld[s];
        for (int i = 0; i < (N_PAD >> (s+1)); i++)
          tree[s+1][i] <= pick(tree[s][2*i], tree[s][2*i+1]);
      end
    end
  end

  assign out_valid = vld[STAGES];
  assign out_match = tree[STAGES][0].m;
  assign out_unit  = tree[STAGES][0].idx;

endmodule

// node_sram: one single-port static RAM bank of the decision-diagram
// pipeline, holding the nodes of one level.
//
// A word is a child pointer into the next bank (or a terminal value in the
// last bank). The address is {node pointer, header bits}, so a bank of 2^PTR
// nodes read STRIDE bits at a time has 2^(PTR+STRIDE) words, as in the
// "2^(W+1) x V" bank of the binary case.
//
// Timing: synchronous. With en high and we low, rdata shows mem[addr] after
// the clock edge. With en and we high, wdata is written to mem[addr] and
// rdata keeps its value. With en low nothing changes, so rdata holds, which
// is how the pipeline stalls. The single port (a write takes the place of a
// read) follows the one-engine update scheme, in which the engine stalls
// while writes are done; that the macro has exactly one port is this
// design's choice. Contents are not reset: they are loaded by writes.
module node_sram #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

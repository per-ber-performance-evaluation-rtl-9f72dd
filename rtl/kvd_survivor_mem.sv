// kvd_survivor_mem: survivor memory of the K-min Viterbi decoder.
//
// Holds, for each of the L layers of a trace-back block, the K parent nodes
// kept in that layer and the survival path s of each (the document's point
// that the KVD needs to store only K status nodes and their s per layer,
// instead of the whole trellis). One row is one layer: K entries of
// {valid, node, surv}.
//
// One write port (a whole row per cycle, written by the forward
// calculation) and one asynchronous read port (a whole row, read by
// trace-back). The memory is a plain register array; row organisation and
// the asynchronous read are this design's choices. Nothing is reset: a
// row is always written before trace-back reads it.
module kvd_survivor_mem
  import kvd_pkg::*;
#(
  parameter int unsigned K  = 5,
  parameter int unsigned L  = 60,
  parameter int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic        clk,
  input  logic        we,
  input  logic [AW-1:0] waddr,
  input  surv_entry_t wdata [K],
  input  logic [AW-1:0] raddr,
  output surv_entry_t rdata [K]
);

  surv_entry_t mem [L][K];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int k = 0; k < K; k++) mem[waddr][k] <= wdata[k];
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++) rdata[k] = mem[raddr][k];
  end

endmodule

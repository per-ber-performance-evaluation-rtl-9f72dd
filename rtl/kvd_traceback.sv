// kvd_traceback: trace-back stage of the K-min Viterbi decoder
// (K_min_find_snode and K_min_decode_data).
//
// Started with the selected node snode(n) of the last layer n of a block
// (the smallest-metric child, found by kvd_sort_knode), it visits layers
// n, n-1, ..., 1, one per clock cycle. In layer l it
//   - decodes I'(l) = snode(l) mod 2                               (eq. 13)
//   - looks snode(l) up among the K entries stored for layer l to get its
//     survival path s(l), and
//   - steps to snode(l-1) = floor(snode(l)/2) + 32*(s(l)-1)         (eq. 12).
// These equations are the document's. The associative lookup of the row,
// the one-layer-per-cycle schedule and the bit write port are this design's
// choices. Layer l is stored at memory row l-1 and its bit is written to
// bit_idx = l-1.
//
// Timing: start is accepted when idle; the bits appear on bit_we in the n
// cycles after it, last one for layer 1; done pulses with that last bit.
// `miss` flags a node that is not in its row, which cannot happen when the
// memory was filled by the forward calculation (an assertion checks it).
module kvd_traceback
  import kvd_pkg::*;
#(
  parameter int unsigned K  = 5,
  parameter int unsigned L  = 60,
  parameter int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  state_t        start_node,   // snode of the last layer of the block
  input  logic [AW:0]   num_layers,   // n, 1..L
  output logic          busy,
  output logic [AW-1:0] raddr,
  input  surv_entry_t   rdata [K],
  output logic          bit_we,
  output logic [AW-1:0] bit_idx,
  output logic          bit_val,
  output logic          step_s2,      // this step followed s = 2
  output logic          done,
  output logic          miss
);

  logic        busy_q;
  state_t      node_q;
  logic [AW:0] layer_q;               // current layer l, 1-based
  logic        surv;
  logic        found;

  assign busy    = busy_q;
  assign raddr   = AW'(layer_q - 1'b1);

  always_comb begin
    found = 1'b0;
    surv  = 1'b0;
    for (int k = 0; k < K; k++) begin
      if (rdata[k].valid && rdata[k].node == node_q) begin
        found = 1'b1;
        surv  = rdata[k].surv;
      end
    end
  end

  assign bit_we  = busy_q;
  assign bit_idx = raddr;
  assign bit_val = node_q[0];
  assign step_s2 = busy_q && surv;
  assign done    = busy_q && (layer_q == 1);
  assign miss    = busy_q && !found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      node_q  <= '0;
      layer_q <= '0;
    end else if (busy_q) begin
      node_q  <= {surv, node_q[NUM_REGS-1:1]};
      layer_q <= layer_q - 1'b1;
      if (layer_q == 1) busy_q <= 1'b0;
    end else if (start) begin
      busy_q  <= 1'b1;
      node_q  <= start_node;
      layer_q <= num_layers;
    end
  end

  // Checked in a clocked process so that found is taken before the update.
  // The checks are off while rst_n is low (registers may not be reset yet at
  // the first edge); this use of rst_n in a clocked process is why lint
  // reports rst_n as both an asynchronous and a synchronous signal.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      // no checks during reset
    end else if (busy_q) begin
      a_found: assert (found)
        else $error("trace-back node %0d not in survivor row %0d", node_q, layer_q);
    end else if (start) begin
      a_layers: assert (num_layers >= 1 && 32'(num_layers) <= L);
    end
  end

endmodule

// kvd_decoder: K-min Viterbi decoder (KVD) for the k = 7 code of
// IEEE 802.11a/n/ac/ah.
//
// Instead of all 64 trellis states, the decoder keeps only the K best
// status nodes (parent nodes) of each layer. Decoding runs in blocks of up
// to L layers (L is the trace-back length), one received coded pair per
// layer, in the two stages of the document:
//   1. Forward calculation, one layer per accepted input pair: the K parents
//      expand into 2K children with their accumulated metrics
//      (kvd_child_gen), the K best distinct children become the next
//      parents (kvd_sort_knode), and each parent's status value and survival
//      path s are written to the layer's row of the survivor memory
//      (kvd_survivor_mem). The first layers of a block hold 1, 2, 4, ...
//      parents, i.e. min(num_node, K), as in the document.
//   2. Trace-back (kvd_traceback) from the best child of the last layer,
//      one layer per cycle, decoding each bit as the parity of the node.
// The decoded bits are then sent out in their original order.
//
// This design's own choices, where the document is silent: a block ends
// after L layers or at the pair marked in_last (the end of a packet), so a
// packet of any length is decoded in blocks of L bits plus a shorter last
// block; a packet starts from status 0 (the encoder's initial state) and the
// next block of the same packet starts from the single node the previous
// trace-back started from, with metric 0; the three phases do not overlap.
//
// Interface: input and output are valid/ready streams. Input: a pair of
// D-bit soft values (0 = certain '0', 2^D-1 = certain '1'), erasure flags for
// punctured positions, and in_last on the last pair of a packet. Output: one
// decoded bit per transfer, out_last on the last bit of a packet. The ev_*
// outputs are one-cycle event strobes for monitoring.
//
// Timing for a block of n layers: n cycles of input (one per accepted pair,
// in_ready is high throughout), 1 cycle to start trace-back, n trace-back
// cycles, then n output transfers; the first decoded bit is offered n + 2
// clock edges after the edge that took the block's last input pair, and the
// bits follow one per cycle while out_ready is high. in_ready is low from the
// last input of a block until the last output of that block has been taken,
// so a block of n bits occupies 3n + 2 cycles without stalls.
module kvd_decoder
  import kvd_pkg::*;
#(
  parameter int unsigned K    = 5,
  parameter int unsigned L    = 60,
  parameter int unsigned D    = 3,
  parameter bit          SOFT = 1'b1,
  // accumulated metric width: holds L worst-case branch metrics plus MAX
  parameter int unsigned MW   = $clog2(L * 2 * ((1 << D) - 1) * ((1 << D) - 1) + 2)
) (
  input  logic         clk,
  input  logic         rst_n,
  // received coded pairs
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_a,
  input  logic [D-1:0] in_b,
  input  logic         in_era_a,
  input  logic         in_era_b,
  input  logic         in_last,
  // decoded bits
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_bit,
  output logic         out_last,
  // event strobes
  output logic         ev_grow,   // a layer held fewer than K parents
  output logic         ev_dup,    // sort_Knode removed a duplicate child
  output logic         ev_s2,     // a trace-back step followed s = 2
  output logic         ev_short,  // a block ended by in_last before L layers
  output logic         ev_block,  // a block finished trace-back
  output logic         ev_miss    // trace-back lost its node (never expected)
);

  localparam int unsigned AW = (L > 1) ? $clog2(L) : 1;

  typedef enum logic [1:0] {S_FWD, S_TB_START, S_TB, S_OUT} phase_t;

  phase_t        phase_q;
  state_t        par_node_q   [K];
  logic [MW-1:0] par_metric_q [K];
  logic [K-1:0]  par_valid_q;
  logic [AW:0]   layer_q;       // layers done in this block
  state_t        best_q;        // snode of the last layer of the block
  logic          pkt_end_q;     // block is the last of its packet
  logic [L-1:0]  obuf_q;
  logic [AW:0]   ocnt_q;

  // forward calculation datapath
  state_t        cand_node   [2*K];
  logic [MW-1:0] cand_metric [2*K];
  logic [2*K-1:0] cand_surv, cand_valid;
  state_t        sel_node    [K];
  logic [MW-1:0] sel_metric  [K];
  logic [K-1:0]  sel_surv, sel_valid;
  logic          dup_removed;
  surv_entry_t   wrow [K];

  kvd_child_gen #(.K(K), .D(D), .SOFT(SOFT), .MW(MW)) u_child (
    .par_node   (par_node_q),
    .par_metric (par_metric_q),
    .par_valid  (par_valid_q),
    .rx_a       (in_a),
    .rx_b       (in_b),
    .era_a      (in_era_a),
    .era_b      (in_era_b),
    .cand_node  (cand_node),
    .cand_metric(cand_metric),
    .cand_surv  (cand_surv),
    .cand_valid (cand_valid)
  );

  kvd_sort_knode #(.K(K), .MW(MW)) u_sort (
    .cand_node  (cand_node),
    .cand_metric(cand_metric),
    .cand_surv  (cand_surv),
    .cand_valid (cand_valid),
    .sel_node   (sel_node),
    .sel_metric (sel_metric),
    .sel_surv   (sel_surv),
    .sel_valid  (sel_valid),
    .dup_removed(dup_removed)
  );

  always_comb begin
    for (int k = 0; k < K; k++) begin
      wrow[k].valid = sel_valid[k];
      wrow[k].node  = sel_node[k];
      wrow[k].surv  = sel_surv[k];
    end
  end

  logic          fwd_fire;
  logic          blk_end;
  logic [AW-1:0] tb_raddr;
  surv_entry_t   tb_rdata [K];
  logic          tb_we, tb_bit, tb_done, tb_s2, tb_miss, tb_busy;
  logic [AW-1:0] tb_idx;

  assign in_ready = (phase_q == S_FWD);
  assign fwd_fire = in_valid && in_ready;
  assign blk_end  = in_last || (layer_q == (AW+1)'(L - 1));

  kvd_survivor_mem #(.K(K), .L(L), .AW(AW)) u_mem (
    .clk   (clk),
    .we    (fwd_fire),
    .waddr (layer_q[AW-1:0]),
    .wdata (wrow),
    .raddr (tb_raddr),
    .rdata (tb_rdata)
  );

  kvd_traceback #(.K(K), .L(L), .AW(AW)) u_tb (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (phase_q == S_TB_START),
    .start_node (best_q),
    .num_layers (layer_q),
    .busy       (tb_busy),
    .raddr      (tb_raddr),
    .rdata      (tb_rdata),
    .bit_we     (tb_we),
    .bit_idx    (tb_idx),
    .bit_val    (tb_bit),
    .step_s2    (tb_s2),
    .done       (tb_done),
    .miss       (tb_miss)
  );

  assign out_valid = (phase_q == S_OUT);
  assign out_bit   = obuf_q[ocnt_q[AW-1:0]];
  assign out_last  = pkt_end_q && (ocnt_q == layer_q - 1'b1);

  assign ev_grow  = fwd_fire && !(&par_valid_q);
  assign ev_dup   = fwd_fire && dup_removed;
  assign ev_s2    = tb_s2;
  assign ev_short = fwd_fire && in_last && (layer_q != (AW+1)'(L - 1));
  assign ev_block = tb_done;
  assign ev_miss  = tb_miss;

  // restart the parent list from a single node with metric 0
  task automatic restart(input state_t node);
    for (int k = 0; k < K; k++) begin
      par_node_q[k]   <= (k == 0) ? node : '0;
      par_metric_q[k] <= '0;
    end
    par_valid_q <= K'(1);
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= S_FWD;
      layer_q   <= '0;
      best_q    <= '0;
      pkt_end_q <= 1'b0;
      obuf_q    <= '0;
      ocnt_q    <= '0;
      restart('0);
    end else begin
      unique case (phase_q)
        S_FWD: if (fwd_fire) begin
          par_node_q   <= sel_node;
          par_metric_q <= sel_metric;
          par_valid_q  <= sel_valid;
          layer_q      <= layer_q + 1'b1;
          if (blk_end) begin
            best_q    <= sel_node[0];
            pkt_end_q <= in_last;
            phase_q   <= S_TB_START;
          end
        end
        S_TB_START: phase_q <= S_TB;
        S_TB: begin
          if (tb_we) obuf_q[tb_idx] <= tb_bit;
          if (tb_done) begin
            ocnt_q  <= '0;
            phase_q <= S_OUT;
          end
        end
        S_OUT: if (out_ready) begin
          ocnt_q <= ocnt_q + 1'b1;
          if (ocnt_q == layer_q - 1'b1) begin
            layer_q <= '0;
            phase_q <= S_FWD;
            restart(pkt_end_q ? '0 : best_q);
          end
        end
        default: phase_q <= S_FWD;
      endcase
    end
  end

  // Checked in a clocked process so that combinational terms are taken
  // before the registers update; off while rst_n is low. This use of rst_n
  // is why lint reports it as both an asynchronous and a synchronous signal.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_tb_phase:   assert (!tb_busy || phase_q == S_TB);
      a_best_valid: assert (!fwd_fire || sel_valid[0]);
    end
  end

endmodule

// kvd_sort_knode: selection of the next layer's parent nodes (sort_Knode).
//
// Takes the N = 2K child candidates of one layer and keeps the K best
// distinct status values, as the document describes: of two candidates with
// the same status value the one with the larger accumulated metric is
// removed, and of the rest the K with the smallest metrics become the parent
// nodes of the next layer. Output slot 0 holds the smallest metric, which is
// the start node of trace-back when the layer is the last of a block.
//
// How it is done is this design's choice: a fully parallel rank sort in one
// combinational step. Ties are broken by candidate index (lower index wins),
// both when removing a duplicate and when ranking, so the result is fully
// determined. A candidate survives duplicate removal if no other valid
// candidate with the same status value beats it; its rank is the number of
// surviving candidates that beat it; it goes to output slot `rank` when
// rank < K. Slots left empty (fewer than K distinct candidates) are marked
// invalid. dup_removed flags that at least one duplicate was removed.
module kvd_sort_knode
  import kvd_pkg::*;
#(
  parameter int unsigned K  = 5,
  parameter int unsigned MW = 13
) (
  input  state_t         cand_node   [2*K],
  input  logic [MW-1:0]  cand_metric [2*K],
  input  logic [2*K-1:0] cand_surv,
  input  logic [2*K-1:0] cand_valid,
  output state_t         sel_node    [K],
  output logic [MW-1:0]  sel_metric  [K],
  output logic [K-1:0]   sel_surv,
  output logic [K-1:0]   sel_valid,
  output logic           dup_removed
);

  localparam int unsigned N  = 2 * K;
  localparam int unsigned RW = $clog2(N + 1);

  // beats[i][j]: candidate i is preferred to candidate j
  logic [N-1:0]  beats [N];
  logic [N-1:0]  keep;
  logic [RW-1:0] rank  [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        beats[i][j] = (cand_metric[i] < cand_metric[j]) ||
                      ((cand_metric[i] == cand_metric[j]) && (i < j));
      end
    end

    dup_removed = 1'b0;
    for (int j = 0; j < N; j++) begin
      keep[j] = cand_valid[j];
      for (int i = 0; i < N; i++) begin
        if (i != j && cand_valid[i] && cand_node[i] == cand_node[j] && beats[i][j]) begin
          keep[j] = 1'b0;
        end
      end
      if (cand_valid[j] && !keep[j]) dup_removed = 1'b1;
    end

    for (int j = 0; j < N; j++) begin
      rank[j] = '0;
      for (int i = 0; i < N; i++) begin
        if (keep[i] && beats[i][j]) rank[j] = rank[j] + 1'b1;
      end
    end

    for (int r = 0; r < K; r++) begin
      sel_node[r]   = '0;
      sel_metric[r] = '1;
      sel_surv[r]   = 1'b0;
      sel_valid[r]  = 1'b0;
      for (int j = 0; j < N; j++) begin
        if (keep[j] && rank[j] == RW'(r)) begin
          sel_node[r]   = cand_node[j];
          sel_metric[r] = cand_metric[j];
          sel_surv[r]   = cand_surv[j];
          sel_valid[r]  = 1'b1;
        end
      end
    end
  end

endmodule

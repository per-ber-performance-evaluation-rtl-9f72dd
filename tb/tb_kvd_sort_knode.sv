// tb_kvd_sort_knode: random candidate lists with forced duplicate status
// values, equal metrics and invalid entries; the K outputs are compared with
// a greedy best-first reference selection (keep the first-seen best of each
// status value until K are taken).
module tb_kvd_sort_knode;
  import kvd_pkg::*;
  import kvd_ref_pkg::*;

  localparam int K = 4, MW = 13, N = 2 * K;
  state_t         cand_node [N];
  logic [MW-1:0]  cand_metric [N];
  logic [N-1:0]   cand_surv, cand_valid;
  state_t         sel_node [K];
  logic [MW-1:0]  sel_metric [K];
  logic [K-1:0]   sel_surv, sel_valid;
  logic           dup_removed;
  int checks = 0, failures = 0;
  int ndup = 0;

  kvd_sort_knode #(.K(K), .MW(MW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      ref_node_t cand[$];
      ref_node_t sel[$];
      bit dup;
      cand.delete();
      for (int c = 0; c < N; c++) begin
        ref_node_t e;
        cand_node[c]   = 6'($urandom);
        if (c > 0 && $urandom_range(0, 2) == 0) cand_node[c] = cand_node[$urandom_range(0, c - 1)];
        cand_metric[c] = MW'($urandom_range(0, 20));
        cand_surv[c]   = 1'($urandom);
        cand_valid[c]  = ($urandom_range(0, 7) != 0);
        e.node = cand_node[c]; e.metric = cand_metric[c]; e.surv = cand_surv[c];
        if (cand_valid[c]) cand.push_back(e);
      end
      #1;
      ref_select(cand, K, sel, dup);
      if (dup) ndup++;
      checks++;
      if (dup_removed != dup) begin
        failures++;
        $display("dup flag %0b expected %0b", dup_removed, dup);
      end
      for (int r = 0; r < K; r++) begin
        checks++;
        if (r < sel.size()) begin
          if (!sel_valid[r] || int'(sel_node[r]) != sel[r].node ||
              int'(sel_metric[r]) != sel[r].metric || int'(sel_surv[r]) != sel[r].surv) begin
            failures++;
            $display("slot %0d: got v=%0b n=%0d m=%0d, expected n=%0d m=%0d", r, sel_valid[r],
                     sel_node[r], sel_metric[r], sel[r].node, sel[r].metric);
          end
        end else if (sel_valid[r]) begin
          failures++;
          $display("slot %0d should be empty", r);
        end
      end
    end
    checks++;
    if (ndup == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

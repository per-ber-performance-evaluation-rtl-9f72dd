// tb_kvd_child_gen: random parent lists (including parents x and x+32 that
// share children, and partly valid lists) expanded by the RTL and by the
// reference model; node, s, metric and valid of all 2K children compared.
// Also the document's example of eq. (9): parent 5 -> 10, 11; 33 -> 2, 3.
module tb_kvd_child_gen;
  import kvd_pkg::*;
  import kvd_ref_pkg::*;

  localparam int K = 4, D = 3, MW = 13;
  state_t        par_node [K];
  logic [MW-1:0] par_metric [K];
  logic [K-1:0]  par_valid;
  logic [D-1:0]  rx_a, rx_b;
  logic          era_a, era_b;
  state_t        cand_node [2*K];
  logic [MW-1:0] cand_metric [2*K];
  logic [2*K-1:0] cand_surv, cand_valid;
  int checks = 0, failures = 0;

  kvd_child_gen #(.K(K), .D(D), .SOFT(1'b1), .MW(MW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    par_node = '{5, 33, 1, 31};
    for (int i = 0; i < K; i++) par_metric[i] = MW'(i);
    par_valid = '1; rx_a = 0; rx_b = 0; era_a = 0; era_b = 0;
    #1;
    checks++;
    if (cand_node[0] != 10 || cand_node[1] != 11 || cand_node[2] != 2 || cand_node[3] != 3 ||
        cand_node[4] != 2 || cand_node[5] != 3 || cand_node[6] != 62 || cand_node[7] != 63 ||
        cand_surv != 8'b0000_1100) begin
      failures++;
      $display("eq. 9 example failed");
    end
    for (int t = 0; t < 2000; t++) begin
      ref_node_t par[$];
      ref_node_t cand[$];
      par.delete();
      for (int i = 0; i < K; i++) begin
        ref_node_t p;
        par_node[i]   = 6'($urandom);
        if (i > 0 && $urandom_range(0, 3) == 0) par_node[i] = par_node[i-1] ^ 6'd32;
        par_metric[i] = MW'($urandom_range(0, 5000));
        p.node = par_node[i]; p.metric = par_metric[i]; p.surv = 0;
        par.push_back(p);
      end
      par_valid = K'($urandom);
      rx_a = D'($urandom); rx_b = D'($urandom);
      era_a = ($urandom_range(0, 5) == 0); era_b = ($urandom_range(0, 5) == 0);
      #1;
      ref_expand(par, rx_a, rx_b, era_a, era_b, D, 1, cand);
      for (int c = 0; c < 2 * K; c++) begin
        checks++;
        if (int'(cand_node[c]) != cand[c].node || int'(cand_metric[c]) != cand[c].metric ||
            int'(cand_surv[c]) != cand[c].surv || cand_valid[c] != par_valid[c/2]) begin
          failures++;
          $display("cand %0d: got n=%0d m=%0d s=%0d, expected n=%0d m=%0d s=%0d", c,
                   cand_node[c], cand_metric[c], cand_surv[c], cand[c].node, cand[c].metric, cand[c].surv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

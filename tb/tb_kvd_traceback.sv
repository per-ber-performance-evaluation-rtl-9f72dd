// tb_kvd_traceback: the document's Fig. 6 example (K = 3, L = 8): the
// trace-back line 33, 16, 40, 20, 10, 5, 2, 1 (from node 0) must decode
// I'(8)..I'(1) = 1,0,0,0,0,1,0,1 and must take s = 2 from 16 back to 40,
// in 8 cycles. Then random survivor rows built from random paths (with
// decoy entries), with the expected bits and cycle counts computed from
// the path itself.
module tb_kvd_traceback;
  import kvd_pkg::*;

  localparam int K = 3, L = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  logic start;
  state_t start_node;
  logic [AW:0] num_layers;
  logic busy, bit_we, bit_val, step_s2, done, miss;
  logic [AW-1:0] raddr, bit_idx;
  surv_entry_t rdata [K];
  surv_entry_t rows [L][K];
  int checks = 0, failures = 0;
  int got [L];
  int nwr, ns2;

  kvd_traceback #(.K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;
  assign rdata = rows[raddr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one trace-back of n layers; returns cycles from start to done
  task automatic run(int n, state_t snode, output int cycles);
    @(negedge clk);
    start = 1; start_node = snode; num_layers = (AW+1)'(n);
    @(negedge clk);
    start = 0;
    cycles = 0; nwr = 0; ns2 = 0;
    for (int i = 0; i < L; i++) got[i] = -1;
    forever begin
      cycles++;
      if (bit_we) begin got[bit_idx] = bit_val; nwr++; end
      if (step_s2) ns2++;
      if (miss) begin failures++; $display("miss at layer index %0d", raddr); end
      if (done) break;
      @(negedge clk);
      if (cycles > 3 * L) break;
    end
    @(negedge clk);   // let the last step complete before rows change
  endtask

  initial begin
    int path [L+1];
    int exp_bits [8] = '{1, 0, 1, 0, 0, 0, 0, 1};   // I'(1)..I'(8)
    int fig6 [9] = '{0, 1, 2, 5, 10, 20, 40, 16, 33}; // node(0)..node(8)
    int cyc;
    start = 0; start_node = 0; num_layers = 0;
    // Fig. 6 rows: the path node plus decoy nodes of the same layer
    for (int l = 1; l <= 8; l++) begin
      rows[l-1][0] = '{valid: 1'b1, node: 6'(fig6[l] ^ 6'd12), surv: 1'b0};
      rows[l-1][1] = '{valid: 1'b1, node: 6'(fig6[l]), surv: 1'(fig6[l-1] >= 32)};
      rows[l-1][2] = '{valid: 1'b0, node: 6'(fig6[l]), surv: 1'(fig6[l-1] < 32)};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 6'd33, cyc);
    for (int l = 1; l <= 8; l++) begin
      checks++;
      if (got[l-1] != exp_bits[l-1]) begin
        failures++;
        $display("Fig. 6: I'(%0d) = %0d, expected %0d", l, got[l-1], exp_bits[l-1]);
      end
    end
    checks += 3;
    if (cyc != 8) begin failures++; $display("Fig. 6: %0d cycles", cyc); end
    if (ns2 != 1) begin failures++; $display("Fig. 6: %0d s=2 steps", ns2); end
    if (nwr != 8) failures++;

    // random paths
    for (int t = 0; t < 300; t++) begin
      int n = $urandom_range(1, L);
      int slot;
      int s2cnt;
      s2cnt = 0;
      path[0] = $urandom_range(0, 63);
      for (int l = 1; l <= n; l++) path[l] = ((path[l-1] * 2) % 64) + $urandom_range(0, 1);
      for (int l = 1; l <= n; l++) begin
        slot = $urandom_range(0, K - 1);
        for (int k = 0; k < K; k++) begin
          state_t dn;
          do dn = 6'($urandom); while (dn == 6'(path[l]));
          rows[l-1][k] = '{valid: 1'($urandom), node: dn, surv: 1'($urandom)};
        end
        rows[l-1][slot] = '{valid: 1'b1, node: 6'(path[l]), surv: 1'(path[l-1] >= 32)};
        if (path[l-1] >= 32) s2cnt++;
      end
      run(n, 6'(path[n]), cyc);
      for (int l = 1; l <= n; l++) begin
        checks++;
        if (got[l-1] != path[l] % 2) begin
          failures++;
          $display("random %0d: layer %0d got %0d expected %0d", t, l, got[l-1], path[l] % 2);
        end
      end
      checks += 2;
      if (cyc != n) begin failures++; $display("cyc %0d n %0d", cyc, n); end
      if (ns2 != s2cnt) begin failures++; $display("ns2 %0d exp %0d", ns2, s2cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

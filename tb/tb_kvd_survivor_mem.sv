// tb_kvd_survivor_mem: writes random rows to random layers of the survivor
// memory, keeping a shadow copy, and reads every layer back.
module tb_kvd_survivor_mem;
  import kvd_pkg::*;

  localparam int K = 5, L = 60, AW = 6;
  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  surv_entry_t wdata [K];
  surv_entry_t rdata [K];
  surv_entry_t shadow [L][K];
  bit written [L];
  int checks = 0, failures = 0;

  kvd_survivor_mem #(.K(K), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = AW'($urandom_range(0, L - 1));
      for (int k = 0; k < K; k++) wdata[k] = surv_entry_t'($urandom);
      raddr = AW'($urandom_range(0, L - 1));
      #1;
      if (written[raddr]) begin
        for (int k = 0; k < K; k++) begin
          checks++;
          if (rdata[k] != shadow[raddr][k]) failures++;
        end
      end
      @(posedge clk);
      if (we) begin
        for (int k = 0; k < K; k++) shadow[waddr][k] = wdata[k];
        written[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

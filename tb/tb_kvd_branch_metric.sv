// tb_kvd_branch_metric: exhaustive check of the path metric, soft (eq. 4,
// squared distance of 3-bit values) and hard (eq. 3, Hamming distance of
// the MSBs), with and without erasures, against integer arithmetic.
module tb_kvd_branch_metric;
  import kvd_ref_pkg::*;

  localparam int D = 3;
  logic exp_a, exp_b, era_a, era_b;
  logic [D-1:0] rx_a, rx_b;
  logic [6:0] pm_soft, pm_hard;
  int checks = 0, failures = 0;

  kvd_branch_metric #(.D(D), .SOFT(1'b1)) u_soft (.exp_a, .exp_b, .rx_a, .rx_b, .era_a, .era_b, .pm(pm_soft));
  kvd_branch_metric #(.D(D), .SOFT(1'b0)) u_hard (.exp_a, .exp_b, .rx_a, .rx_b, .era_a, .era_b, .pm(pm_hard));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (4 + 2 * D)); v++) begin
      {era_a, era_b, exp_a, exp_b, rx_a, rx_b} = v[4+2*D-1:0];
      #1;
      checks += 2;
      if (int'(pm_soft) != ref_pm(exp_a, exp_b, rx_a, rx_b, era_a, era_b, D, 1)) begin
        failures++;
        $display("soft: e=%b%b r=%0d,%0d era=%b%b got %0d", exp_a, exp_b, rx_a, rx_b, era_a, era_b, pm_soft);
      end
      if (int'(pm_hard) != ref_pm(exp_a, exp_b, rx_a, rx_b, era_a, era_b, D, 0)) begin
        failures++;
        $display("hard: e=%b%b r=%0d,%0d era=%b%b got %0d", exp_a, exp_b, rx_a, rx_b, era_a, era_b, pm_hard);
      end
    end
    // spot values worked out by hand: expected 11, received (0,3) -> 49 + 16
    exp_a = 1; exp_b = 1; rx_a = 0; rx_b = 3; era_a = 0; era_b = 0; #1;
    checks++; if (pm_soft != 65 || pm_hard != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

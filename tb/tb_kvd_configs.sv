// tb_kvd_configs: runs the decoder configurations of the evaluation side by
// side on the same kind of traffic (100-byte packets, 3-bit soft values,
// one fixed noise level): K = 1, 3, 5, 10, 32, 64 at L = 60, and K = 5 at
// L = 20, 100 and 800, and K = 5, L = 60 with hard decisions. Each is checked bit for bit against the reference
// K-min decoder of the same K and L; the error counts are printed so the
// trend with K and L can be seen.
module tb_kvd_configs;
  localparam int N = 10;
  localparam int PKTS = 6, LEN = 800, NOISE = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] done;
  int checks_v [N], fail_v [N], berr [N], perr [N];
  int checks = 0, failures = 0;
  string names [N] = '{"K=1 L=60", "K=3 L=60", "K=5 L=60", "K=10 L=60", "K=32 L=60",
                       "K=64 L=60", "K=5 L=20", "K=5 L=100", "K=5 L=800", "K=5 hard"};

  always #5 clk = ~clk;

  kvd_cfg_harness #(.K(1),  .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h0 (clk, rst_n, done[0], checks_v[0], fail_v[0], berr[0], perr[0]);
  kvd_cfg_harness #(.K(3),  .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h1 (clk, rst_n, done[1], checks_v[1], fail_v[1], berr[1], perr[1]);
  kvd_cfg_harness #(.K(5),  .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h2 (clk, rst_n, done[2], checks_v[2], fail_v[2], berr[2], perr[2]);
  kvd_cfg_harness #(.K(10), .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h3 (clk, rst_n, done[3], checks_v[3], fail_v[3], berr[3], perr[3]);
  kvd_cfg_harness #(.K(32), .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h4 (clk, rst_n, done[4], checks_v[4], fail_v[4], berr[4], perr[4]);
  kvd_cfg_harness #(.K(64), .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h5 (clk, rst_n, done[5], checks_v[5], fail_v[5], berr[5], perr[5]);
  kvd_cfg_harness #(.K(5),  .L(20),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h6 (clk, rst_n, done[6], checks_v[6], fail_v[6], berr[6], perr[6]);
  kvd_cfg_harness #(.K(5),  .L(100), .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h7 (clk, rst_n, done[7], checks_v[7], fail_v[7], berr[7], perr[7]);
  kvd_cfg_harness #(.K(5),  .L(800), .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE)) h8 (clk, rst_n, done[8], checks_v[8], fail_v[8], berr[8], perr[8]);
  kvd_cfg_harness #(.K(5),  .L(60),  .PKTS(PKTS), .PKT_LEN(LEN), .NOISE(NOISE), .SOFT(1'b0)) h9 (clk, rst_n, done[9], checks_v[9], fail_v[9], berr[9], perr[9]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("%-10s: %0d bit errors, %0d of %0d packets in error, %0d mismatches with reference",
               names[i], berr[i], perr[i], PKTS, fail_v[i]);
      checks += checks_v[i];
      failures += fail_v[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

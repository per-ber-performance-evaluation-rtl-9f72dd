// tb_kvd_decoder: packets of random length and noise level are encoded by
// the reference encoder, disturbed by a soft-value channel model and fed to
// the decoder with random input gaps and output back-pressure. Every
// decoded bit is compared with the reference K-min decoder; noise-free
// packets must decode to the transmitted bits. Also checks the block
// timing of this implementation: the first decoded bit of a block of n
// layers is offered n + 2 cycles after its last input pair was taken.
// Uses K = 3 and L = 12 so that every block-level case occurs often.
module tb_kvd_decoder;
  import kvd_ref_pkg::*;

  localparam int K = 3, L = 12, D = 3;
  localparam int MAXN = 200;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_era_a, in_era_b, in_last;
  logic [D-1:0] in_a, in_b;
  logic out_valid, out_ready, out_bit, out_last;
  logic ev_grow, ev_dup, ev_s2, ev_short, ev_block, ev_miss;
  int checks = 0, failures = 0;
  int n_grow = 0, n_dup = 0, n_s2 = 0, n_short = 0, n_block = 0;
  int last_in_cycle, cycle = 0, timing_checked = 0;
  bit first_out_pending = 0;

  kvd_decoder #(.K(K), .L(L), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_grow  += ev_grow;  n_dup += ev_dup; n_s2 += ev_s2;
      n_short += ev_short; n_block += ev_block;
      if (ev_miss) begin failures++; $display("trace-back miss"); end
      if (in_valid && in_ready && dut.blk_end) begin
        last_in_cycle = cycle; first_out_pending = 1;
      end
      if (out_valid && first_out_pending) begin
        first_out_pending = 0;
        timing_checked++;
        checks++;
        if (cycle - last_in_cycle != int'(dut.layer_q) + 2) begin
          failures++;
          $display("block latency %0d for %0d layers", cycle - last_in_cycle, dut.layer_q);
        end
      end
    end
  end

  int ra[], rb[], ea[], eb[], info[], dec[], got[];

  task automatic channel(int n, int noise, bit punct);
    int st = 0;
    ra = new[n]; rb = new[n]; ea = new[n]; eb = new[n]; info = new[n];
    for (int i = 0; i < n; i++) begin
      int ab, va, vb;
      info[i] = $urandom_range(0, 1);
      ab = ref_enc(st, info[i]);
      st = ref_next(st, info[i]);
      va = ((ab >> 1) ? 7 : 0) + $urandom_range(0, 2 * noise) - noise;
      vb = ((ab & 1) ? 7 : 0) + $urandom_range(0, 2 * noise) - noise;
      ra[i] = va < 0 ? 0 : va > 7 ? 7 : va;
      rb[i] = vb < 0 ? 0 : vb > 7 ? 7 : vb;
      ea[i] = punct && (i % 3 == 2);
      eb[i] = punct && (i % 3 == 1);
    end
  endtask

  task automatic run_packet(int n, int noise, bit punct);
    int nout = 0;
    channel(n, noise, punct);
    ref_decode(ra, rb, ea, eb, n, K, L, D, 1, dec);
    got = new[n];
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_a = D'(ra[i]); in_b = D'(rb[i]);
          in_era_a = ea[i][0]; in_era_b = eb[i][0]; in_last = (i == n - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin
        while (nout < n) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            got[nout] = out_bit;
            checks++;
            if (out_last != (nout == n - 1)) begin failures++; $display("out_last wrong at %0d", nout); end
            nout++;
          end
        end
      end
    join
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] != dec[i]) begin
        failures++;
        $display("packet n=%0d noise=%0d bit %0d: got %0d reference %0d", n, noise, i, got[i], dec[i]);
      end
      if (noise == 0 && !punct) begin
        checks++;
        if (got[i] != info[i]) failures++;
      end
    end
  endtask

  initial begin
    in_valid = 0; in_a = 0; in_b = 0; in_era_a = 0; in_era_b = 0; in_last = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_packet(L, 0, 0);
    run_packet(3 * L + 5, 0, 0);
    for (int p = 0; p < 150; p++)
      run_packet($urandom_range(1, MAXN), $urandom_range(0, 6), ($urandom_range(0, 3) == 0));
    checks += 5;
    if (n_grow == 0)  begin failures++; $display("no growing layer seen"); end
    if (n_dup == 0)   begin failures++; $display("no duplicate removal seen"); end
    if (n_s2 == 0)    begin failures++; $display("no s=2 step seen"); end
    if (n_short == 0) begin failures++; $display("no short block seen"); end
    if (timing_checked == 0) failures++;
    $display("events: grow=%0d dup=%0d s2=%0d short=%0d blocks=%0d", n_grow, n_dup, n_s2, n_short, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_kvd_codec_top: end-to-end test of the codec at its default parameters
// (K = 5, L = 60, 3-bit soft decisions).
//
// Each packet of random information bits goes through the RTL encoder
// (checked against the reference encoder), a channel model that maps coded
// bits to soft levels 0 / 7 and adds uniform integer noise, optional
// puncturing to rate 3/4 (the punctured positions are erased at the
// decoder input), and the RTL decoder, with random input gaps and output
// back-pressure. Every decoded bit is compared with the reference K-min
// decoder, noise-free rate-1/2 packets must come back error free, and the
// bit and packet error counts are reported. Packet sizes include the 20,
// 100 and 500 byte packets of the evaluated workloads.
//
// Mechanisms counted (each must occur): growing layers (fewer than K
// parents), duplicate child removal, s = 2 trace-back steps, short final
// blocks, multi-block packets (start node carried over), encoder clear,
// erased inputs, decoder input stall and output back-pressure.
module tb_kvd_codec_top;
  import kvd_ref_pkg::*;

  localparam int K = 5, L = 60, D = 3;

  logic clk = 0, rst_n = 0;
  logic enc_clear, enc_in_valid, enc_in_ready, enc_in_bit;
  logic enc_out_valid, enc_out_ready, enc_out_a, enc_out_b;
  logic dec_in_valid, dec_in_ready, dec_in_era_a, dec_in_era_b, dec_in_last;
  logic [D-1:0] dec_in_a, dec_in_b;
  logic dec_out_valid, dec_out_ready, dec_out_bit, dec_out_last;
  logic [5:0] dec_events;

  int checks = 0, failures = 0;
  int n_grow = 0, n_dup = 0, n_s2 = 0, n_short = 0, n_block = 0;
  int n_multi = 0, n_clear = 0, n_erased = 0, n_stall = 0, n_bp = 0;
  int bit_err = 0, bits = 0, pkt_err = 0, pkts = 0;

  kvd_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      n_grow += dec_events[0]; n_dup += dec_events[1]; n_s2 += dec_events[2];
      n_short += dec_events[3]; n_block += dec_events[4];
      if (dec_events[5]) begin failures++; $display("trace-back miss"); end
      if (dec_in_valid && !dec_in_ready) n_stall++;
      if (dec_out_valid && !dec_out_ready) n_bp++;
    end
  end

  int info[], ca[], cb[], ra[], rb[], ea[], eb[], dec[], got[];

  task automatic encode(int n);
    int st = 0, i = 0;
    info = new[n]; ca = new[n]; cb = new[n];
    foreach (info[j]) info[j] = $urandom_range(0, 1);
    @(negedge clk);
    enc_clear = 1; n_clear++;
    while (i < n) begin
      enc_in_valid  = ($urandom_range(0, 4) != 0);
      enc_out_ready = ($urandom_range(0, 4) != 0);
      enc_in_bit    = info[i][0];
      @(posedge clk);
      if (enc_in_valid && enc_in_ready && enc_out_valid) begin
        int ab = ref_enc(st, info[i]);
        ca[i] = enc_out_a; cb[i] = enc_out_b;
        checks++;
        if ({enc_out_a, enc_out_b} != 2'(ab)) begin failures++; $display("encoder bit %0d wrong", i); end
        st = ref_next(st, info[i]);
        i++;
        @(negedge clk);
        enc_clear = 0;
      end else begin
        @(negedge clk);
      end
    end
    enc_in_valid = 0; enc_clear = 0;
  endtask

  task automatic channel(int n, int noise, bit punct);
    ra = new[n]; rb = new[n]; ea = new[n]; eb = new[n];
    for (int i = 0; i < n; i++) begin
      int va = (ca[i] ? 7 : 0) + $urandom_range(0, 2 * noise) - noise;
      int vb = (cb[i] ? 7 : 0) + $urandom_range(0, 2 * noise) - noise;
      ra[i] = va < 0 ? 0 : va > 7 ? 7 : va;
      rb[i] = vb < 0 ? 0 : vb > 7 ? 7 : vb;
      // 802.11 rate-3/4 puncturing keeps A0 B0 A1 B2 of every three pairs
      ea[i] = punct && (i % 3 == 2);
      eb[i] = punct && (i % 3 == 1);
      n_erased += ea[i] + eb[i];
    end
  endtask

  task automatic decode(int n, bit noiseless);
    int nout = 0, errs = 0;
    got = new[n];
    fork
      begin
        for (int i = 0; i < n; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 7) == 0) begin dec_in_valid = 0; @(negedge clk); end
          dec_in_valid = 1; dec_in_a = D'(ra[i]); dec_in_b = D'(rb[i]);
          dec_in_era_a = ea[i][0]; dec_in_era_b = eb[i][0]; dec_in_last = (i == n - 1);
          @(posedge clk);
          while (!dec_in_ready) @(posedge clk);
        end
        @(negedge clk); dec_in_valid = 0; dec_in_last = 0;
      end
      begin
        while (nout < n) begin
          @(negedge clk);
          dec_out_ready = ($urandom_range(0, 7) != 0);
          @(posedge clk);
          if (dec_out_valid && dec_out_ready) begin
            got[nout] = dec_out_bit;
            checks++;
            if (dec_out_last != (nout == n - 1)) begin failures++; $display("out_last wrong"); end
            nout++;
          end
        end
      end
    join
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] != dec[i]) begin
        failures++;
        $display("n=%0d bit %0d: got %0d reference %0d", n, i, got[i], dec[i]);
      end
      if (got[i] != info[i]) errs++;
    end
    if (noiseless) begin
      checks++;
      if (errs != 0) begin failures++; $display("noise-free packet of %0d bits has %0d errors", n, errs); end
    end
    bits += n; bit_err += errs; pkts++; pkt_err += (errs != 0);
    if (n > L) n_multi++;
  endtask

  task automatic packet(int n, int noise, bit punct);
    encode(n);
    channel(n, noise, punct);
    ref_decode(ra, rb, ea, eb, n, K, L, D, 1, dec);
    decode(n, noise == 0 && !punct);
  endtask

  int ps [3] = '{20, 100, 500};

  initial begin
    enc_clear = 0; enc_in_valid = 0; enc_in_bit = 0; enc_out_ready = 1;
    dec_in_valid = 0; dec_in_a = 0; dec_in_b = 0; dec_in_era_a = 0; dec_in_era_b = 0;
    dec_in_last = 0; dec_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // evaluated packet sizes: 20, 100 and 500 bytes
    for (int j = 0; j < 3; j++) begin
      packet(8 * ps[j], 0, 0);
      packet(8 * ps[j], 4, 0);
      packet(8 * ps[j], 2, 1);
    end
    for (int p = 0; p < 30; p++)
      packet($urandom_range(1, 3 * L), $urandom_range(0, 5), ($urandom_range(0, 2) == 0));
    checks += 10;
    if (n_grow == 0)   begin failures++; $display("no growing layer"); end
    if (n_dup == 0)    begin failures++; $display("no duplicate removal"); end
    if (n_s2 == 0)     begin failures++; $display("no s=2 step"); end
    if (n_short == 0)  begin failures++; $display("no short block"); end
    if (n_multi == 0)  begin failures++; $display("no multi-block packet"); end
    if (n_block <= pkts) begin failures++; $display("no block carry-over"); end
    if (n_clear == 0)  begin failures++; $display("no encoder clear"); end
    if (n_erased == 0) begin failures++; $display("no erased input"); end
    if (n_stall == 0)  begin failures++; $display("no decoder input stall"); end
    if (n_bp == 0)     begin failures++; $display("no output back-pressure"); end
    $display("events: grow=%0d dup=%0d s2=%0d short=%0d blocks=%0d multi=%0d clear=%0d erased=%0d stall=%0d backpressure=%0d",
             n_grow, n_dup, n_s2, n_short, n_block, n_multi, n_clear, n_erased, n_stall, n_bp);
    $display("channel: %0d bit errors in %0d bits, %0d of %0d packets in error", bit_err, bits, pkt_err, pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// kvd_cfg_harness: drives one kvd_decoder of a given K and L with packets
// from a reference encoder and a noisy soft-value channel, compares every
// decoded bit with the reference K-min decoder of the same K and L, and
// counts decoded bit and packet errors against the transmitted data.
// Used by tb_kvd_configs to run the decoder configurations the evaluation
// compares (K = 1 ... 64, L = 20 ... 800, soft or hard decision) side by
// side.
module kvd_cfg_harness #(
  parameter int K       = 5,
  parameter int L       = 60,
  parameter int PKTS    = 10,
  parameter int PKT_LEN = 800,
  parameter int NOISE   = 5,
  parameter bit SOFT    = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   bit_errors,
  output int   packet_errors
);
  import kvd_ref_pkg::*;

  localparam int D = 3;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_bit, out_last;
  logic [D-1:0] in_a, in_b;
  logic [5:0] ev;

  kvd_decoder #(.K(K), .L(L), .D(D), .SOFT(SOFT)) u_dec (
    .clk, .rst_n, .in_valid, .in_ready, .in_a, .in_b, .in_era_a(1'b0), .in_era_b(1'b0),
    .in_last, .out_valid, .out_ready, .out_bit, .out_last,
    .ev_grow(ev[0]), .ev_dup(ev[1]), .ev_s2(ev[2]), .ev_short(ev[3]), .ev_block(ev[4]), .ev_miss(ev[5]));

  int info[], ra[], rb[], era[], dec[], got[];

  initial begin
    done = 0; checks = 0; failures = 0; bit_errors = 0; packet_errors = 0;
    in_valid = 0; in_last = 0; in_a = 0; in_b = 0; out_ready = 1;
    info = new[PKT_LEN]; ra = new[PKT_LEN]; rb = new[PKT_LEN]; era = new[PKT_LEN]; got = new[PKT_LEN];
    @(posedge rst_n);
    for (int p = 0; p < PKTS; p++) begin
      automatic int st = 0, nout = 0, errs = 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        int ab, va, vb;
        info[i] = $urandom_range(0, 1);
        ab = ref_enc(st, info[i]);
        st = ref_next(st, info[i]);
        va = ((ab >> 1) ? 7 : 0) + $urandom_range(0, 2 * NOISE) - NOISE;
        vb = ((ab & 1) ? 7 : 0) + $urandom_range(0, 2 * NOISE) - NOISE;
        ra[i] = va < 0 ? 0 : va > 7 ? 7 : va;
        rb[i] = vb < 0 ? 0 : vb > 7 ? 7 : vb;
        era[i] = 0;
      end
      ref_decode(ra, rb, era, era, PKT_LEN, K, L, D, SOFT, dec);
      fork
        for (int i = 0; i < PKT_LEN; i++) begin
          @(negedge clk);
          in_valid = 1; in_a = D'(ra[i]); in_b = D'(rb[i]); in_last = (i == PKT_LEN - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        while (nout < PKT_LEN) begin
          @(posedge clk);
          if (out_valid) begin got[nout] = out_bit; nout++; end
        end
      join
      @(negedge clk); in_valid = 0; in_last = 0;
      for (int i = 0; i < PKT_LEN; i++) begin
        checks++;
        if (got[i] != dec[i]) failures++;
        if (got[i] != info[i]) errs++;
      end
      bit_errors += errs;
      packet_errors += (errs != 0);
    end
    done = 1;
  end

  always @(posedge clk) if (rst_n && ev[5]) failures++;
endmodule

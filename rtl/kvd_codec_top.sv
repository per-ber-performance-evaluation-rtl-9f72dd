// kvd_codec_top: the BCC encoder of the transmitter and the K-min Viterbi
// decoder of the receiver, side by side.
//
// In a WLAN PHY the encoder's coded pairs (A, B) pass through puncturing,
// interleaving, modulation, the radio channel, demodulation and
// de-interleaving before they reach the decoder as soft values; all of that
// lies outside this design, so the encoder's output and the decoder's input
// are separate ports and a testbench (or the rest of a PHY) closes the loop.
// See bcc_encoder and kvd_decoder for the two halves.
//
// Parameters: K parents kept per layer (default 5, the upper end of the
// recommended 3..5), trace-back length L = 60, D = 3-bit soft decisions,
// SOFT = 1 for the Euclidean path metric (0: Hamming on the hard decision).
module kvd_codec_top #(
  parameter int unsigned K    = 5,
  parameter int unsigned L    = 60,
  parameter int unsigned D    = 3,
  parameter bit          SOFT = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmitter: information bits in, coded pairs out
  input  logic         enc_clear,
  input  logic         enc_in_valid,
  output logic         enc_in_ready,
  input  logic         enc_in_bit,
  output logic         enc_out_valid,
  input  logic         enc_out_ready,
  output logic         enc_out_a,
  output logic         enc_out_b,
  // receiver: soft coded pairs in, decoded bits out
  input  logic         dec_in_valid,
  output logic         dec_in_ready,
  input  logic [D-1:0] dec_in_a,
  input  logic [D-1:0] dec_in_b,
  input  logic         dec_in_era_a,
  input  logic         dec_in_era_b,
  input  logic         dec_in_last,
  output logic         dec_out_valid,
  input  logic         dec_out_ready,
  output logic         dec_out_bit,
  output logic         dec_out_last,
  output logic [5:0]   dec_events   // {miss, block, short, s2, dup, grow}
);

  bcc_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (enc_clear),
    .in_valid  (enc_in_valid),
    .in_ready  (enc_in_ready),
    .in_bit    (enc_in_bit),
    .out_valid (enc_out_valid),
    .out_ready (enc_out_ready),
    .out_a     (enc_out_a),
    .out_b     (enc_out_b)
  );

  kvd_decoder #(.K(K), .L(L), .D(D), .SOFT(SOFT)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dec_in_valid),
    .in_ready  (dec_in_ready),
    .in_a      (dec_in_a),
    .in_b      (dec_in_b),
    .in_era_a  (dec_in_era_a),
    .in_era_b  (dec_in_era_b),
    .in_last   (dec_in_last),
    .out_valid (dec_out_valid),
    .out_ready (dec_out_ready),
    .out_bit   (dec_out_bit),
    .out_last  (dec_out_last),
    .ev_grow   (dec_events[0]),
    .ev_dup    (dec_events[1]),
    .ev_s2     (dec_events[2]),
    .ev_short  (dec_events[3]),
    .ev_block  (dec_events[4]),
    .ev_miss   (dec_events[5])
  );

endmodule

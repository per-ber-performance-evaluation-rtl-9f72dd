// bcc_encoder: rate-1/2 binary convolutional encoder of IEEE 802.11a/n/ac/ah.
//
// Six registers R5..R0 hold the last six input bits; every accepted input
// bit I produces the coded pair A (generator 133 octal) and B (generator 171
// octal) from I and the registers, after which the registers shift towards
// the MSB and I enters R0. The registers start at zero, and `clear` returns
// them to zero at the start of a packet (clear and an input bit in the same
// cycle encode that bit from the zero state). All of this follows the
// document's description of the encoder.
//
// Interface: a valid/ready stream of single bits in, a valid/ready stream of
// (A, B) pairs out. The output is combinational from the input (zero
// latency); in_ready is out_ready. The handshake and the clear input are this
// design's own choices.
module bcc_encoder
  import kvd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,      // return the registers to the all-zero state
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,     // information bit I
  output logic out_valid,
  input  logic out_ready,
  output logic out_a,      // coded bit A (g0 = 133)
  output logic out_b       // coded bit B (g1 = 171)
);

  state_t regs_q;
  state_t cur_state;

  assign cur_state = clear ? '0 : regs_q;
  assign in_ready  = out_ready;
  assign out_valid = in_valid;
  assign {out_a, out_b} = bcc_out(cur_state, in_bit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs_q <= '0;
    end else if (in_valid && out_ready) begin
      regs_q <= next_state(cur_state, in_bit);
    end else if (clear) begin
      regs_q <= '0;
    end
  end

endmodule

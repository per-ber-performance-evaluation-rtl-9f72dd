// kvd_pkg: types and functions shared by the BCC encoder and the K-min
// Viterbi decoder (KVD).
//
// The code is the IEEE 802.11a/n/ac/ah binary convolutional code with
// constraint length k = 7, i.e. m = 6 registers R5..R0 and generator
// polynomials g0 = 133 (octal, output A) and g1 = 171 (octal, output B).
// A trellis status value is the 6-bit register contents {R5,...,R0}; R0 holds
// the most recent input bit. Shifting in input bit I gives the child status
//   cnode = (2*pnode mod 64) + I                                  (eq. 9)
// and the parent of a status node is either floor(cnode/2) (survival path
// s = 1) or floor(cnode/2) + 32 (s = 2)                   (eq. 10-12).
// In hardware s is carried as one bit: 0 for s = 1, 1 for s = 2, which is
// exactly the bit that re-enters as R5 of the parent during trace-back.
package kvd_pkg;

  localparam int unsigned CONSTRAINT_LEN = 7;
  localparam int unsigned NUM_REGS       = CONSTRAINT_LEN - 1;

  typedef logic [NUM_REGS-1:0] state_t;

  // One survivor-memory entry: a parent node kept in a layer and the path
  // it was reached by.
  typedef struct packed {
    logic   valid;
    state_t node;
    logic   surv;   // 0: s = 1 (came from floor(node/2)), 1: s = 2 (+32)
  } surv_entry_t;

  // Child status reached from parent p with input bit i (eq. 9). R5 (p[5])
  // is shifted out, so lint reports it as unused here.
  function automatic state_t next_state(state_t p, logic i);
    return {p[NUM_REGS-2:0], i};
  endfunction

  // Encoder outputs {A, B} for input bit i leaving register state p.
  // Bit j of p holds the input delayed by j+1. g0 = 1011011b taps the input
  // and delays 2, 3, 5, 6; g1 = 1111001b taps the input and delays 1, 2, 3, 6.
  // Delay 4 (p[3]) is tapped by neither generator, so lint reports that bit
  // of p as unused; that is a property of the code.
  function automatic logic [1:0] bcc_out(state_t p, logic i);
    logic a, b;
    a = i ^ p[1] ^ p[2] ^ p[4] ^ p[5];
    b = i ^ p[0] ^ p[1] ^ p[2] ^ p[5];
    return {a, b};
  endfunction

endpackage

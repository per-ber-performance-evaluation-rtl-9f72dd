// kvd_child_gen: one forward-calculation layer of the K-min Viterbi decoder
// before sorting (specify_status_node, calculate_path_metric and
// K_min_calculate_accum_metric).
//
// Each of the K parent nodes p (with accumulated metric m(p)) produces two
// child candidates, one per input bit I, numbered 2*i+I for parent slot i:
//   cnode = (2*p mod 64) + I                                        (eq. 9)
//   s     = 1 if p < 32, 2 if p >= 32
//   m1    = m(p) + pm if s = 1, else MAX                          (eq. 6)
//   m2    = m(p) + pm if s = 2, else MAX                          (eq. 7)
//   m     = min(m1, m2)                                             (eq. 8)
// where pm is the branch metric of the branch p -> cnode for the received
// pair. Candidates of invalid parent slots (early layers hold fewer than K
// parents) are invalid. Each candidate is treated as its own node even when
// two parents share a child (x and x+32); kvd_sort_knode resolves that, as
// the document does. The computation follows the document; MAX is the
// all-ones value of the MW-bit metric.
//
// Purely combinational; the caller sizes MW so that m(p) + pm never reaches
// MAX within one trace-back block.
module kvd_child_gen
  import kvd_pkg::*;
#(
  parameter int unsigned K    = 5,
  parameter int unsigned D    = 3,
  parameter bit          SOFT = 1'b1,
  parameter int unsigned MW   = 13
) (
  input  state_t          par_node   [K],
  input  logic [MW-1:0]   par_metric [K],
  input  logic [K-1:0]    par_valid,
  input  logic [D-1:0]    rx_a,
  input  logic [D-1:0]    rx_b,
  input  logic            era_a,
  input  logic            era_b,
  output state_t          cand_node   [2*K],
  output logic [MW-1:0]   cand_metric [2*K],
  output logic [2*K-1:0]  cand_surv,
  output logic [2*K-1:0]  cand_valid
);

  localparam int unsigned PMW = $clog2(2 * ((1 << D) - 1) * ((1 << D) - 1) + 1);
  localparam logic [MW-1:0] MAX = '1;

  for (genvar c = 0; c < 2 * K; c++) begin : g_cand
    localparam int unsigned P   = c / 2;
    localparam logic        BIT = 1'(c % 2);

    logic [1:0]     exp_ab;
    logic [PMW-1:0] pm;
    logic [MW-1:0]  sum, m1, m2;
    logic           s2;

    assign exp_ab = bcc_out(par_node[P], BIT);

    kvd_branch_metric #(.D(D), .SOFT(SOFT), .PMW(PMW)) u_bm (
      .exp_a (exp_ab[1]),
      .exp_b (exp_ab[0]),
      .rx_a  (rx_a),
      .rx_b  (rx_b),
      .era_a (era_a),
      .era_b (era_b),
      .pm    (pm)
    );

    always_comb begin
      s2  = par_node[P][NUM_REGS-1];
      sum = par_metric[P] + MW'(pm);
      m1  = s2 ? MAX : sum;
      m2  = s2 ? sum : MAX;
      cand_metric[c] = (m1 < m2) ? m1 : m2;
      cand_node[c]   = next_state(par_node[P], BIT);
      cand_surv[c]   = s2;
      cand_valid[c]  = par_valid[P];
    end
  end

endmodule

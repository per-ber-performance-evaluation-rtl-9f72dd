// kvd_branch_metric: path metric of one trellis branch (calculate_path_metric).
//
// Compares the coded pair a branch expects, (exp_a, exp_b), with the received
// pair (rx_a, rx_b). With SOFT = 1 the received values are D-bit soft values
// and the metric is the squared Euclidean distance of eq. (4); with SOFT = 0
// only the MSB (the hard decision) of each received value is used and the
// metric is the Hamming distance of eq. (3). Both follow the document.
//
// The soft value encoding is this design's choice: an unsigned D-bit number,
// 0 meaning a certain '0' and 2^D-1 a certain '1'; an expected bit is mapped
// to 0 or 2^D-1 before the subtraction. An erased value (era_a / era_b, used
// for punctured positions) contributes nothing to the metric.
//
// Purely combinational. PMW = width of the worst-case metric 2*(2^D-1)^2.
module kvd_branch_metric #(
  parameter int unsigned D    = 3,
  parameter bit          SOFT = 1'b1,
  parameter int unsigned PMW  = $clog2(2 * ((1 << D) - 1) * ((1 << D) - 1) + 1)
) (
  input  logic           exp_a,
  input  logic           exp_b,
  input  logic [D-1:0]   rx_a,
  input  logic [D-1:0]   rx_b,
  input  logic           era_a,
  input  logic           era_b,
  output logic [PMW-1:0] pm
);

  localparam int unsigned SQW = 2 * D;

  logic [D-1:0]   lvl_a, lvl_b;      // expected soft level
  logic [D-1:0]   dist_a, dist_b;    // |expected - received|
  logic [SQW-1:0] sq_a, sq_b;
  logic [PMW-1:0] term_a, term_b;

  always_comb begin
    lvl_a  = exp_a ? {D{1'b1}} : '0;
    lvl_b  = exp_b ? {D{1'b1}} : '0;
    dist_a = (lvl_a >= rx_a) ? lvl_a - rx_a : rx_a - lvl_a;
    dist_b = (lvl_b >= rx_b) ? lvl_b - rx_b : rx_b - lvl_b;
    sq_a   = SQW'(dist_a) * SQW'(dist_a);
    sq_b   = SQW'(dist_b) * SQW'(dist_b);
    if (SOFT) begin
      term_a = PMW'(sq_a);
      term_b = PMW'(sq_b);
    end else begin
      term_a = PMW'(exp_a ^ rx_a[D-1]);
      term_b = PMW'(exp_b ^ rx_b[D-1]);
    end
    if (era_a) term_a = '0;
    if (era_b) term_b = '0;
    pm = term_a + term_b;
  end

endmodule

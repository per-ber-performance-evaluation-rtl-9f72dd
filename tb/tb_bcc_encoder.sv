// tb_bcc_encoder: checks the k = 7 BCC encoder against a reference encoder
// (generator polynomials as octal masks), including the first pairs of
// the document's trellis example (0 -> 0/00, 0 -> 1/11), the clear input
// and stalls on out_ready.
module tb_bcc_encoder;
  import kvd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear, in_valid, in_bit, out_ready;
  logic in_ready, out_valid, out_a, out_b;
  int checks = 0, failures = 0;
  int st;

  bcc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(int exp_ab);
    checks++;
    if ({out_a, out_b} !== 2'(exp_ab) || !out_valid) begin
      failures++;
      $display("mismatch: got %b%b expected %02b", out_a, out_b, exp_ab);
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_bit = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // document example: from state 0, input 0 gives 00 and input 1 gives 11
    @(negedge clk); in_valid = 1; in_bit = 0; #1 check_pair(0);
    in_bit = 1; #1 check_pair(3);
    @(negedge clk); in_valid = 0;
    st = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear     = ($urandom_range(0, 99) == 0);
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 4) != 0);
      in_bit    = 1'($urandom);
      if (clear) st = 0;
      #1;
      checks++;
      if (in_ready !== out_ready || out_valid !== in_valid) failures++;
      if (in_valid) check_pair(ref_enc(st, in_bit));
      if (in_valid && out_ready) st = ref_next(st, in_bit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

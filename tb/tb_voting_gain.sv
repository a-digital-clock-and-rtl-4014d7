// tb_voting_gain: small-signal gain of decimation by voting, measured on
// the vote_decimator RTL against a plain sum (boxcar) of the same samples.
//
// Each of the 8 phase-detector outputs of a word is drawn independently:
// no transition with probability 1/2, otherwise late with probability p
// and early with 1-p, as for random data with a small phase error. For
// p = 0.5 + 0.05 and p = 0.5 - 0.05, 100 000 words each, the testbench
// sums the decimator outputs and the boxcar sums. Working the vote rule
// through this distribution gives a voting gain of 0.546 of the boxcar
// gain for groups of four (0.547 in the small-signal limit), so the
// overall gain of the decimator is 8 * 0.546 = 4.37 per unit of the
// single-detector mean. The measured ratio must be within 0.03 of 0.546.
module tb_voting_gain;
  import dcdr_pkg::*;

  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b1;
  phe_t [W-1:0] phe = '0;
  logic         in_valid = 1'b0;
  dec_t         dec;
  logic         out_valid;
  int           checks = 0, failures = 0;

  vote_decimator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  longint vote_sum = 0, box_sum = 0;

  always @(posedge clk) if (rst_n && out_valid) vote_sum += longint'(dec);

  task automatic run(int p_late_permille, int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < W; i++) begin
        if ($urandom_range(0, 1) == 0) phe[i] = PHE_NONE;
        else if ($urandom_range(0, 999) < p_late_permille) phe[i] = PHE_LATE;
        else phe[i] = PHE_EARLY;
        box_sum += longint'(phe[i]);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    real ratio;
    longint v_hi, b_hi;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(550, 100000);
    v_hi = vote_sum; b_hi = box_sum;
    vote_sum = 0; box_sum = 0;
    run(450, 100000);
    // difference of the two runs cancels any bias
    ratio = real'(v_hi - vote_sum) / real'(b_hi - box_sum);
    $display("voting gain relative to boxcar: %0.4f (expected 0.546)", ratio);
    checks++;
    if (ratio < 0.516 || ratio > 0.576) begin
      failures++;
      $display("FAIL voting gain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

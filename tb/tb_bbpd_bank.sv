// tb_bbpd_bank: drives random data and edge words into the phase-detector
// bank, with word strobes at random times, and checks each registered
// decision one clock after its strobe. The reference keeps its own copy
// of the last data bit of the previous word, so the decision across the
// word boundary is checked too.
module tb_bbpd_bank;
  import dcdr_pkg::*;

  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b1;
  logic         word_valid = 1'b0;
  logic [W-1:0] data = '0, phase = '0;
  phe_t [W-1:0] phe;
  logic         phe_valid;
  int           checks = 0, failures = 0, boundary_decisions = 0;

  bbpd_bank #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int decide(logic dp, logic pp, logic dc);
    if (dp == dc) return 0;
    return (pp == dp) ? -1 : 1;
  endfunction

  initial begin
    logic         ref_last;
    int           exp_d [W];
    ref_last = 1'b0;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      word_valid = ($urandom_range(0, 2) != 0);
      data  = W'($urandom);
      phase = W'($urandom);
      if (word_valid) begin
        for (int i = 0; i < W; i++)
          exp_d[i] = decide(i == 0 ? ref_last : data[i-1], phase[i], data[i]);
        ref_last = data[W-1];
      end
      @(posedge clk);
      #1;
      checks++;
      if (phe_valid != word_valid) begin
        failures++;
        $display("FAIL valid %0b expected %0b", phe_valid, word_valid);
      end
      if (word_valid) begin
        if (exp_d[0] != 0) boundary_decisions++;
        for (int i = 0; i < W; i++) begin
          checks++;
          if (int'(phe[i]) != exp_d[i]) begin
            failures++;
            $display("FAIL t=%0d bit %0d phe=%0d expected %0d", t, i, phe[i], exp_d[i]);
          end
        end
      end
    end
    checks++;
    if (boundary_decisions == 0) begin
      failures++;
      $display("FAIL no decision across a word boundary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

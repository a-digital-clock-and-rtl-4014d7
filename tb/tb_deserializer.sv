// tb_deserializer: feeds random 4-bit data and edge slices and checks
// that every second clock a word strobe appears with the last two slices
// assembled earliest-first, and that the word clock is high in the first
// half of each word period.
module tb_deserializer;
  localparam int M = 4, W = 8;
  logic         clk = 1'b0, rst_n = 1'b1;
  logic [M-1:0] data_slice = '0, phase_slice = '0;
  logic [W-1:0] data_word, phase_word;
  logic         word_valid, word_clk;
  int           checks = 0, failures = 0, words = 0;

  deserializer #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  logic [M-1:0] hist_d [$];
  logic [M-1:0] hist_p [$];

  initial begin
    int since_valid;
    since_valid = -1;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      data_slice  = M'($urandom);
      phase_slice = M'($urandom);
      hist_d.push_back(data_slice);
      hist_p.push_back(phase_slice);
      @(posedge clk);
      #1;
      if (word_valid) begin
        words++;
        checks += 3;
        // the word was completed by the slices sent at t and t-1
        if (data_word != {hist_d[t], hist_d[t-1]}) begin
          failures++;
          $display("FAIL data_word %h", data_word);
        end
        if (phase_word != {hist_p[t], hist_p[t-1]}) begin
          failures++;
          $display("FAIL phase_word %h", phase_word);
        end
        if (since_valid >= 0 && since_valid != W / M) begin
          failures++;
          $display("FAIL word period %0d", since_valid);
        end
        if (!word_clk) begin
          failures++;
          $display("FAIL word_clk low at word start");
        end
        since_valid = 0;
      end else if (since_valid >= 0) begin
        checks++;
        if (word_clk) begin
          failures++;
          $display("FAIL word_clk high in second half");
        end
      end
      if (since_valid >= 0) since_valid++;
      @(negedge clk);
    end
    checks++;
    if (words < 400) begin
      failures++;
      $display("FAIL only %0d words", words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vote_decimator: random phase-error words (biased at times so that
// all sums -2..+2 occur) into the voting decimator; each output is checked
// one clock after its input against two majority counts, and every output
// value -2..+2 must have been seen.
module tb_vote_decimator;
  import dcdr_pkg::*;

  localparam int W = 8;
  logic         clk = 1'b0, rst_n = 1'b1;
  phe_t [W-1:0] phe = '0;
  logic         in_valid = 1'b0;
  dec_t         dec;
  logic         out_valid;
  int           checks = 0, failures = 0;
  int           seen [5];

  vote_decimator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int vote_ref(int late, int early);
    return (late > early) ? 1 : (early > late) ? -1 : 0;
  endfunction

  initial begin
    int exp_dec, bias;
    foreach (seen[i]) seen[i] = 0;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int l0, e0, l1, e1;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      bias = $urandom_range(0, 2);
      l0 = 0; e0 = 0; l1 = 0; e1 = 0;
      for (int i = 0; i < W; i++) begin
        int r;
        r = $urandom_range(0, 5);
        if (bias == 1 && r < 3) r = 1;
        if (bias == 2 && r < 3) r = 2;
        case (r % 3)
          0: phe[i] = PHE_NONE;
          1: phe[i] = PHE_LATE;
          default: phe[i] = PHE_EARLY;
        endcase
        if (i < W / 2) begin
          if (r % 3 == 1) l0++; else if (r % 3 == 2) e0++;
        end else begin
          if (r % 3 == 1) l1++; else if (r % 3 == 2) e1++;
        end
      end
      exp_dec = vote_ref(l0, e0) + vote_ref(l1, e1);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin
        failures++;
        $display("FAIL valid");
      end
      if (in_valid) begin
        checks++;
        seen[exp_dec + 2]++;
        if (int'(dec) != exp_dec) begin
          failures++;
          $display("FAIL t=%0d dec=%0d expected %0d", t, dec, exp_dec);
        end
      end
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL output %0d never produced", v - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

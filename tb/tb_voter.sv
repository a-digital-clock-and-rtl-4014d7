// tb_voter: exhaustive check of the 4-input voter (all 81 combinations of
// -1/0/+1 inputs) against a count of late and early votes.
module tb_voter;
  import dcdr_pkg::*;

  localparam int N = 4;
  phe_t [N-1:0] in;
  phe_t         vote;
  int           checks = 0, failures = 0;

  voter #(.N(N)) dut (.in(in), .vote(vote));

  initial begin
    for (int c = 0; c < 81; c++) begin
      int v, nl, ne, exp_v;
      v = c; nl = 0; ne = 0;
      for (int i = 0; i < N; i++) begin
        case (v % 3)
          0: in[i] = PHE_NONE;
          1: begin in[i] = PHE_LATE;  nl++; end
          default: begin in[i] = PHE_EARLY; ne++; end
        endcase
        v = v / 3;
      end
      exp_v = (nl > ne) ? 1 : (ne > nl) ? -1 : 0;
      #1;
      checks++;
      if (int'(vote) != exp_v) begin
        failures++;
        $display("FAIL late=%0d early=%0d vote=%0d", nl, ne, vote);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

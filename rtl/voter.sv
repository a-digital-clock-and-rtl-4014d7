// voter: majority vote across N phase-error samples.
//
// The output is the sign of the sum of the N inputs: +1 if more samples
// say late than early, -1 if more say early, 0 on a tie (including no
// transitions at all). Voting rather than summing is what the
// architecture uses to shorten the decimation path; that the vote is the
// sign of the sum, with ties giving 0, is this design's reading of it.
// Purely combinational.
module voter
  import dcdr_pkg::*;
#(
  parameter int unsigned N = WORD_W_DEF / 2
) (
  input  phe_t [N-1:0] in,
  output phe_t         vote
);

  localparam int unsigned SW = $clog2(N + 1) + 1;  // signed sum width

  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += SW'(in[i]);
    if (sum > 0)      vote = PHE_LATE;
    else if (sum < 0) vote = PHE_EARLY;
    else              vote = PHE_NONE;
  end

endmodule

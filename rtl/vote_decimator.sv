// vote_decimator: decimation of W phase-error samples by voting.
//
// The W samples of one word are split into two halves of W/2; each half is
// reduced by a voter to -1, 0 or +1, and the two votes are added into a
// 3-bit value in -2..+2 (one value per word, a decimation by W). The
// structure (two W/2-input voters and an adder) follows the architecture;
// the lower half of the word goes to the first voter. The sum is
// registered: when in_valid is high, out and out_valid follow one clock
// later (registering here is this design's choice).
module vote_decimator
  import dcdr_pkg::*;
#(
  parameter int unsigned W = WORD_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  phe_t [W-1:0] phe,
  input  logic         in_valid,
  output dec_t         dec,
  output logic         out_valid
);

  localparam int unsigned H = W / 2;

  phe_t vote_lo, vote_hi;

  voter #(.N(H)) u_vote_lo (.in(phe[H-1:0]),   .vote(vote_lo));
  voter #(.N(H)) u_vote_hi (.in(phe[W-1:H]),   .vote(vote_hi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dec <= dec_t'(vote_lo) + dec_t'(vote_hi);
    end
  end

  initial assert (W >= 2 && W % 2 == 0)
    else $error("vote_decimator: W must be even");

endmodule

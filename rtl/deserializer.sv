// deserializer: gathers the outputs of M data slicers and M edge slicers
// into W-bit data and edge ("phase") words.
//
// The slicers are clocked by the DPC phases at f_baud/M, so each clock
// brings M new data bits and M new edge samples, bit 0 being the earliest.
// After W/M clocks a full word is available: data_word and phase_word hold
// it (earliest bit in bit 0) and word_valid is high for one clock. Edge
// sample phase_word[i] lies between data_word[i-1] and data_word[i].
// word_clk is a registered divided clock at f_baud/W, high for the first
// half of each word period, for logic downstream that wants a real word
// clock; the CDR itself runs on clk with word_valid as an enable.
// The document gives the deserializer only as a block with these outputs;
// the shift-register structure and the strobe are this design's choices.
// W must be a multiple of M with W/M >= 2.
module deserializer
  import dcdr_pkg::*;
#(
  parameter int unsigned M = SLICE_M_DEF,
  parameter int unsigned W = WORD_W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] data_slice,
  input  logic [M-1:0] phase_slice,
  output logic [W-1:0] data_word,
  output logic [W-1:0] phase_word,
  output logic         word_valid,
  output logic         word_clk
);

  localparam int unsigned R  = W / M;
  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic [CW-1:0] cnt;
  logic [W-1:0]  d_sr, p_sr;
  logic [W-1:0]  d_next, p_next;
  logic          last;

  // New slices enter at the top and move down, so the earliest slice of
  // a word ends in the low bits.
  assign d_next = {data_slice,  d_sr[W-1:M]};
  assign p_next = {phase_slice, p_sr[W-1:M]};
  assign last   = (cnt == CW'(R - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      d_sr       <= '0;
      p_sr       <= '0;
      data_word  <= '0;
      phase_word <= '0;
      word_valid <= 1'b0;
      word_clk   <= 1'b0;
    end else begin
      d_sr       <= d_next;
      p_sr       <= p_next;
      word_valid <= last;
      cnt        <= last ? '0 : cnt + 1'b1;
      word_clk   <= last || (int'(cnt) + 1 < int'(R / 2));
      if (last) begin
        data_word  <= d_next;
        phase_word <= p_next;
      end
    end
  end

  initial assert (M >= 1 && W % M == 0 && W / M >= 2)
    else $error("deserializer: W must be a multiple of M with W/M >= 2");

endmodule

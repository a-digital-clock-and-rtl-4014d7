// bbpd_bank: a bank of W bang-bang phase detectors working on one
// deserialized word.
//
// Bit 0 of each word is the earliest in time. Edge sample phase[i] lies
// between data[i-1] and data[i]; for i = 0 the data bit before it is the
// last bit of the previous word, which the bank keeps in a register. When
// word_valid is high the W decisions are registered and phe_valid is high
// on the next clock (one clock of latency). Running W detectors in
// parallel at the word rate follows the architecture; the register stage
// and the valid strobe are this design's choices.
module bbpd_bank
  import dcdr_pkg::*;
#(
  parameter int unsigned W = WORD_W_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           word_valid,
  input  logic [W-1:0]   data,
  input  logic [W-1:0]   phase,
  output phe_t [W-1:0]   phe,
  output logic           phe_valid
);

  logic         d_last;     // last data bit of the previous word
  phe_t [W-1:0] phe_c;
  logic [W:0]   d_ext;      // {data, d_last}: d_ext[i] is d[i-1]

  assign d_ext = {data, d_last};

  for (genvar i = 0; i < W; i++) begin : g_pd
    bbpd u_pd (
      .d_prev (d_ext[i]),
      .p      (phase[i]),
      .d_cur  (data[i]),
      .phe    (phe_c[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_last    <= 1'b0;
      phe       <= '0;
      phe_valid <= 1'b0;
    end else begin
      phe_valid <= word_valid;
      if (word_valid) begin
        d_last <= data[W-1];
        phe    <= phe_c;
      end
    end
  end

endmodule

// dcdr_top: digital clock recovery for a multi-Gb/s binary receiver.
//
// The analog charge pump, loop filter and VCO of a classic CDR are
// replaced by digital logic driving a digital-to-phase converter (DPC):
//   deserializer    M data and M edge slicer outputs per clock -> W-bit words
//   bbpd_bank       W bang-bang phase detectors, one decision per bit
//   vote_decimator  two W/2-input voters summed: one value in -2..+2 per word
//   loop_filter     8x proportional path + 1x/2x/4x integral path into a
//                   wrapping phase integrator; its top DPC_W bits are the
//                   DPC code (1 UI = 2^DPC_W codes)
// The slicers, the DPC and the analog front end are outside this module:
// the slicer outputs come in on data_slice/phase_slice, and dpc_code goes
// out to the DPC, which must rotate its 2M clock phases (f_baud/M) by
// dpc_code/2^DPC_W UI and wrap without limit. A late decision raises the
// code, so a higher code must move the sampling instants earlier.
//
// clk is the slicer clock (f_baud/M). Everything runs on it, with the
// deserializer's word strobe as the enable, so the loop works once per
// word. Latency from the clock that completes a word in the deserializer
// to the new dpc_code: 1 (word register) + 1 (detectors) + 1 (decimator)
// + 1 (phase integrator) + 1 (DPC register) = 5 clocks. The rest of the
// loop delay (DPC control path, slicers) is outside.
// The chain of blocks and all default sizes follow the test device; the
// slicer count M = 4 and the valid-strobe pipelining are this design's
// choices.
module dcdr_top
  import dcdr_pkg::*;
#(
  parameter int unsigned M        = SLICE_M_DEF,
  parameter int unsigned W        = WORD_W_DEF,
  parameter int unsigned PHASE_W  = PHASE_W_DEF,
  parameter int unsigned FREQ_W   = FREQ_W_DEF,
  parameter int unsigned DPC_W    = DPC_W_DEF,
  parameter int unsigned FREQ_TOP = DPC_W_DEF,
  parameter int unsigned PHUG_SH  = PHUG_SH_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // from the slicers (bit 0 earliest)
  input  logic [M-1:0]              data_slice,
  input  logic [M-1:0]              phase_slice,
  // control and test hooks
  input  frug_sel_t                 frug_sel,
  input  logic                      freq_load,
  input  logic signed [FREQ_W-1:0]  freq_load_val,
  // recovered data
  output logic [W-1:0]              data_word,
  output logic                      word_valid,
  output logic                      word_clk,
  // to the DPC
  output logic [DPC_W-1:0]          dpc_code,
  output logic                      code_valid,
  // observation
  output phe_t [W-1:0]              phe,
  output dec_t                      dec,
  output logic                      dec_valid,
  output logic [PHASE_W-1:0]        phase_reg,
  output logic signed [FREQ_W-1:0]  freq_reg,
  output logic                      freq_sat
);

  logic [W-1:0] phase_word;
  logic         phe_valid;

  deserializer #(.M(M), .W(W)) u_deser (
    .clk         (clk),
    .rst_n       (rst_n),
    .data_slice  (data_slice),
    .phase_slice (phase_slice),
    .data_word   (data_word),
    .phase_word  (phase_word),
    .word_valid  (word_valid),
    .word_clk    (word_clk)
  );

  bbpd_bank #(.W(W)) u_pd_bank (
    .clk        (clk),
    .rst_n      (rst_n),
    .word_valid (word_valid),
    .data       (data_word),
    .phase      (phase_word),
    .phe        (phe),
    .phe_valid  (phe_valid)
  );

  vote_decimator #(.W(W)) u_decim (
    .clk       (clk),
    .rst_n     (rst_n),
    .phe       (phe),
    .in_valid  (phe_valid),
    .dec       (dec),
    .out_valid (dec_valid)
  );

  loop_filter #(
    .PHASE_W  (PHASE_W),
    .FREQ_W   (FREQ_W),
    .DPC_W    (DPC_W),
    .FREQ_TOP (FREQ_TOP),
    .PHUG_SH  (PHUG_SH)
  ) u_lf (
    .clk           (clk),
    .rst_n         (rst_n),
    .en            (dec_valid),
    .err           (dec),
    .frug_sel      (frug_sel),
    .freq_load     (freq_load),
    .freq_load_val (freq_load_val),
    .phase_reg     (phase_reg),
    .freq_reg      (freq_reg),
    .dpc_code      (dpc_code),
    .code_valid    (code_valid),
    .freq_sat      (freq_sat)
  );

endmodule

// loop_filter: proportional-integral loop filter and phase integrator of
// the digital PLL, in the sample realization's sizes.
//
// Once per word (when en is high) the decimated phase error err (-2..+2)
// updates two registers:
//   * the frequency integrator, signed and saturating, FREQ_W bits,
//     adds err times the selected gain (1x, 2x or 4x; nothing when the
//     gain select is FRUG_OFF). It saturates instead of rolling over so
//     that it can hold both positive and negative ppm offsets;
//   * the phase integrator, unsigned and wrapping, PHASE_W bits, adds err
//     shifted left by PHUG_SH (8x) plus the top FREQ_TOP bits of the
//     frequency register, sign-extended. Wrapping lets the sampling phase
//     move without limit, turning a frequency offset into a phase ramp.
// The top DPC_W bits of the phase integrator are registered once more and
// drive the digital-to-phase converter (DPC). With the defaults the phase
// register keeps 6 dither bits, so phug = 8 * 2^-6 = 2^-3, and the
// frequency register keeps 6 more, so frug = 2^-12 at 1x (2^-11, 2^-10 at
// 2x, 4x). The largest frequency word, 255, moves the DPC by 3.98 codes
// every word of 8 UI: about 972 ppm of trackable offset.
//
// Timing: err sampled with en at clock t updates phase_reg and freq_reg at
// t+1; dpc_code follows at t+2 with code_valid high for that one clock.
// The frequency register seen by the phase integrator is the registered
// value (the one from before this update).
//
// Test hooks: freq_load writes freq_load_val into the frequency register
// (it takes priority over integration). With FRUG_OFF the programmed value
// then stays, and the loop settles where the decimator output cancels it,
// which measures the combined phase-detector and decimator gain.
// The widths, gains and bit selections follow the sample realization;
// the reset values (all zero), the load port and the off setting of the
// gain select are this design's choices.
module loop_filter
  import dcdr_pkg::*;
#(
  parameter int unsigned PHASE_W  = PHASE_W_DEF,
  parameter int unsigned FREQ_W   = FREQ_W_DEF,
  parameter int unsigned DPC_W    = DPC_W_DEF,
  parameter int unsigned FREQ_TOP = DPC_W_DEF,
  parameter int unsigned PHUG_SH  = PHUG_SH_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  dec_t                     err,
  input  frug_sel_t                frug_sel,
  input  logic                     freq_load,
  input  logic signed [FREQ_W-1:0] freq_load_val,
  output logic        [PHASE_W-1:0] phase_reg,
  output logic signed [FREQ_W-1:0]  freq_reg,
  output logic        [DPC_W-1:0]   dpc_code,
  output logic                      code_valid,
  output logic                      freq_sat     // saturation limited the last update
);

  localparam logic signed [FREQ_W:0] FMAX = (FREQ_W+1)'((1 << (FREQ_W-1)) - 1);
  localparam logic signed [FREQ_W:0] FMIN = -(FREQ_W+1)'(1 << (FREQ_W-1));

  logic signed [FREQ_W:0]       f_gain;   // err times the selected gain
  logic signed [FREQ_W:0]       f_sum;    // unsaturated sum, one bit wider
  logic signed [FREQ_W-1:0]     f_next;
  logic                         f_clip;
  logic signed [FREQ_TOP-1:0]   f_top;
  logic        [PHASE_W-1:0]    p_next;
  logic                         upd_q;

  always_comb begin
    unique case (frug_sel)
      FRUG_X1: f_gain = (FREQ_W+1)'(err);
      FRUG_X2: f_gain = (FREQ_W+1)'(err) <<< 1;
      FRUG_X4: f_gain = (FREQ_W+1)'(err) <<< 2;
      default: f_gain = '0;
    endcase
    f_sum  = (FREQ_W+1)'(freq_reg) + f_gain;
    f_clip = 1'b0;
    if (f_sum > FMAX) begin
      f_next = FREQ_W'(FMAX);
      f_clip = 1'b1;
    end else if (f_sum < FMIN) begin
      f_next = FREQ_W'(FMIN);
      f_clip = 1'b1;
    end else begin
      f_next = FREQ_W'(f_sum);
    end

    f_top  = freq_reg[FREQ_W-1 -: FREQ_TOP];
    p_next = phase_reg
           + PHASE_W'(signed'(PHASE_W'(err)) <<< PHUG_SH)
           + PHASE_W'(f_top);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_reg  <= '0;
      freq_reg   <= '0;
      dpc_code   <= '0;
      upd_q      <= 1'b0;
      code_valid <= 1'b0;
      freq_sat   <= 1'b0;
    end else begin
      upd_q      <= en;
      code_valid <= upd_q;
      if (en) begin
        phase_reg <= p_next;
        freq_sat  <= f_clip && !freq_load;
      end
      if (freq_load)  freq_reg <= freq_load_val;
      else if (en)    freq_reg <= f_next;
      if (upd_q) dpc_code <= phase_reg[PHASE_W-1 -: DPC_W];
    end
  end

  initial assert (FREQ_TOP <= FREQ_W && DPC_W <= PHASE_W && PHUG_SH + 3 <= PHASE_W)
    else $error("loop_filter: inconsistent widths");

endmodule

// dcdr_pkg: types and constants shared by the digital clock and data
// recovery (CDR) loop.
//
// A bang-bang phase detector decision is a 2-bit two's-complement value:
// +1 means the edge sample was taken late, -1 early, 0 no data transition.
// Data bit value 1 stands for symbol +1 and 0 for symbol -1. The decimator
// output is a 3-bit signed value in -2..+2. The frequency-gain select picks
// the integral path gain; the three non-zero settings are the 1x, 2x and 4x
// of the sample realization (frug = 2^-12, 2^-11, 2^-10), and FRUG_OFF is
// the "frug set to zero" setting used to measure the phase-detector gain.
// The encodings themselves are this design's choice.
package dcdr_pkg;

  // Phase-error sample from one bang-bang phase detector.
  typedef logic signed [1:0] phe_t;
  localparam phe_t PHE_LATE  = 2'sd1;
  localparam phe_t PHE_NONE  = 2'sd0;
  localparam phe_t PHE_EARLY = -2'sd1;

  // Decimated phase error: sum of two voter outputs, -2..+2.
  typedef logic signed [2:0] dec_t;

  // Integral-path gain select (Fig. 13 gain select plus an off setting).
  typedef enum logic [1:0] {
    FRUG_OFF = 2'd0,
    FRUG_X1  = 2'd1,
    FRUG_X2  = 2'd2,
    FRUG_X4  = 2'd3
  } frug_sel_t;

  // Sizes of the test-device realization.
  localparam int unsigned WORD_W_DEF   = 8;   // decimation factor w
  localparam int unsigned SLICE_M_DEF  = 4;   // slicers per kind (assumed)
  localparam int unsigned PHASE_W_DEF  = 15;  // phase integrator width
  localparam int unsigned FREQ_W_DEF   = 15;  // frequency integrator width
  localparam int unsigned DPC_W_DEF    = 9;   // DPC code width, 1 UI / 2^9
  localparam int unsigned PHUG_SH_DEF  = 3;   // 8x proportional gain

endpackage

// tx_model: behavioural model of a serial transmitter and channel, for
// simulation only.
//
// It sends a PRBS31 sequence (x^31 + x^28 + 1) as symbols +-1. Each
// transition is a half sine one UI wide centred on the transition time,
// so the signal reaches full amplitude at the bit centres and crosses zero
// with a slope of pi per UI. The bit period is UI_PS * (1 + ppm * 1e-6).
// Sinusoidal jitter of sj_pp UI peak-to-peak at sj_hz, starting from zero
// at time sj_t0_ps, moves the transition times. Gaussian voltage noise of
// rms sigma_v is added at every output step (UI_PS / 32); at a zero
// crossing a noise of sigma_v equals sigma_v / pi UI of jitter.
module tx_model #(
  parameter real         UI_PS = 200.0,
  parameter logic [30:0] SEED  = 31'h2A5A_1234
) (
  input  real ppm,
  input  real sj_pp,
  input  real sj_hz,
  input  real sj_t0_ps,
  input  real sigma_v,
  output real vin
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real PI = 3.14159265358979;

  logic [30:0] lfsr = SEED;

  function automatic real next_sym();
    logic nb;
    nb = lfsr[30] ^ lfsr[27];
    lfsr = {lfsr[29:0], nb};
    return nb ? 1.0 : -1.0;
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 1000000)) / 1.0e6 - 0.5;
    return s / 0.57735;
  endfunction

  function automatic real shape(real x);  // transition shape, x in UI
    if (x <= -0.5) return 0.0;
    if (x >= 0.5)  return 1.0;
    return (1.0 + $sin(PI * x)) / 2.0;
  endfunction

  initial begin
    real b_prev, b_cur, b_next, t_k, t_k1, t_base, now, sj;
    vin = 0.0;
    b_prev = next_sym(); b_cur = next_sym(); b_next = next_sym();
    t_k = 0.0; t_k1 = UI_PS; t_base = UI_PS;
    forever begin
      now = $realtime;
      while (now >= t_k1) begin
        b_prev = b_cur; b_cur = b_next; b_next = next_sym();
        t_k = t_k1;
        t_base = t_base + UI_PS * (1.0 + ppm * 1.0e-6);
        sj = 0.0;
        if (sj_pp > 0.0 && t_base > sj_t0_ps)
          sj = sj_pp / 2.0 * UI_PS * $sin(2.0 * PI * sj_hz * (t_base - sj_t0_ps) * 1.0e-12);
        t_k1 = t_base + sj;
      end
      vin = b_prev + (b_cur - b_prev) * shape((now - t_k) / UI_PS)
                   + (b_next - b_cur) * shape((now - t_k1) / UI_PS)
          + sigma_v * gauss();
      #(UI_PS / 32.0);
    end
  end
endmodule

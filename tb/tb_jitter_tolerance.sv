// tb_jitter_tolerance: sinusoidal jitter tolerance of the closed loop for
// the three integral gains (1x, 2x, 4x: frug = 2^-12, 2^-11, 2^-10).
//
// The receiver is built as in tb_cdr_system: tx_model (PRBS31, half-sine
// transitions, 0.0375 UI rms random jitter), four data and four edge
// slicer_model instances on the phases of dpc_model, retiming on phase 0,
// and dcdr_top. For each gain and each jitter frequency the amplitude is
// raised step by step; each trial resets the loop, lets it lock for 5000
// words (acquiring from up to half a UI winds up the frequency register,
// which takes a while to unwind at low gain) with no frequency offset, turns the sinusoidal jitter on, waits
// one jitter period and then counts PRBS31 recursion errors over two more
// periods (at least 1500 words). The largest amplitude with no error is
// the tolerance. Far fewer bits are checked than a 1e-10 bit error rate
// needs, so the numbers are optimistic.
// Checks: every point tolerates at least 0.2 UI; at 120 kHz, well inside
// the loop bandwidth, the tolerance is at least twice that at 2 MHz; at
// 2 MHz, above the bandwidth, it is below 1 UI.
module tb_jitter_tolerance;
  timeunit 1ps;
  timeprecision 1fs;
  import dcdr_pkg::*;

  localparam int  M = 4, W = 8;
  localparam real UI = 200.0;
  localparam real SIGMA_V = 0.118;
  localparam int  NF = 5, NA = 12, NG = 3;
  localparam real FREQS [NF] = '{1.2e5, 2.5e5, 5.0e5, 1.0e6, 2.0e6};
  localparam real AMPS  [NA] = '{0.2, 0.3, 0.4, 0.5, 0.7, 1.0, 1.4, 2.0, 2.8, 4.0, 5.6, 8.0};

  logic               rst_n = 1'b1;
  real                ppm = 0.0, sj_pp = 0.0, sj_hz = 1.0e6, sj_t0 = 0.0;
  real                vin, off = 0.0;
  logic [2*M-1:0]     ph;
  logic [M-1:0]       dq, eq, data_slice = '0, phase_slice = '0;
  frug_sel_t          frug_sel = FRUG_X1;
  logic               freq_load = 1'b0;
  logic signed [14:0] freq_load_val = '0;
  logic [W-1:0]       data_word;
  logic               word_valid, word_clk;
  logic [8:0]         dpc_code;
  logic               code_valid;
  phe_t [W-1:0]       phe;
  dec_t               dec;
  logic               dec_valid;
  logic [14:0]        phase_reg;
  logic signed [14:0] freq_reg;
  logic               freq_sat;

  int checks = 0, failures = 0;

  tx_model #(.UI_PS(UI)) u_tx (
    .ppm(ppm), .sj_pp(sj_pp), .sj_hz(sj_hz), .sj_t0_ps(sj_t0), .sigma_v(SIGMA_V), .vin(vin)
  );

  dpc_model #(.M(M), .CODE_W(9), .UI_PS(UI)) u_dpc (.code(dpc_code), .ph(ph));

  for (genvar i = 0; i < M; i++) begin : g_slicers
    slicer_model u_edge (.clk(ph[2*i]),   .vin(vin), .offset(off), .q(eq[i]));
    slicer_model u_data (.clk(ph[2*i+1]), .vin(vin), .offset(off), .q(dq[i]));
  end

  always @(posedge ph[0]) begin
    data_slice  <= dq;
    phase_slice <= eq;
  end

  dcdr_top dut (
    .clk(ph[0]), .rst_n, .data_slice, .phase_slice, .frug_sel, .freq_load,
    .freq_load_val, .data_word, .word_valid, .word_clk, .dpc_code,
    .code_valid, .phe, .dec, .dec_valid, .phase_reg, .freq_reg, .freq_sat
  );

  // recovered data against the PRBS31 recursion
  bit hist [$];
  bit measuring = 1'b0;
  int n_bits = 0, n_err = 0, n_ones = 0;

  always @(posedge ph[0]) if (rst_n && word_valid) begin
    for (int i = 0; i < W; i++) begin
      hist.push_back(data_word[i]);
      if (hist.size() > 32) void'(hist.pop_front());
      if (measuring && hist.size() == 32) begin
        n_bits++;
        if (hist[31] != (hist[0] ^ hist[3])) n_err++;
        if (hist[31]) n_ones++;
      end
    end
  end

  task automatic words(int n);
    repeat (n * (W / M)) @(posedge ph[0]);
  endtask

  // One trial: 1 if the loop passes with no error.
  task automatic trial(frug_sel_t g, real hz, real amp, output bit pass);
    int period_words, meas_words;
    sj_pp = 0.0;
    frug_sel = g;
    rst_n = 1'b0;
    words(4);
    hist.delete();
    rst_n = 1'b1;
    words(5000);
    period_words = int'(1.0e12 / hz / (UI * real'(W)));
    meas_words = (2 * period_words > 1500) ? 2 * period_words : 1500;
    sj_hz = hz; sj_pp = amp; sj_t0 = $realtime;
    words(period_words);
    n_bits = 0; n_err = 0; n_ones = 0;
    measuring = 1'b1;
    words(meas_words);
    measuring = 1'b0;
    pass = (n_err == 0) && (n_ones * 10 > n_bits * 4) && (n_ones * 10 < n_bits * 6);
  endtask

  real tol [NG][NF];

  initial begin
    frug_sel_t gains [NG];
    gains = '{FRUG_X1, FRUG_X2, FRUG_X4};
    #1 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    for (int g = 0; g < NG; g++) begin
      for (int f = 0; f < NF; f++) begin
        bit pass;
        tol[g][f] = 0.0;
        for (int a = 0; a < NA; a++) begin
          trial(gains[g], FREQS[f], AMPS[a], pass);
          if (!pass) break;
          tol[g][f] = AMPS[a];
        end
        $display("frug %s  %8.0f Hz : tolerates %0.1f UI pk-pk",
                 gains[g].name(), FREQS[f], tol[g][f]);
        checks++;
        if (tol[g][f] < 0.2) begin
          failures++;
          $display("FAIL tolerance below 0.2 UI");
        end
      end
      checks += 2;
      if (tol[g][0] < 2.0 * tol[g][NF-1]) begin
        failures++;
        $display("FAIL low-frequency tolerance not above high-frequency tolerance");
      end
      if (tol[g][NF-1] >= 1.0) begin
        failures++;
        $display("FAIL tolerance at 2 MHz implausibly high");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(8.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

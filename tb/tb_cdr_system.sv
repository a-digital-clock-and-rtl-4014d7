// tb_cdr_system: the digital CDR closed around behavioural models of its
// analog neighbours, in real time at 5 Gb/s (UI = 200 ps).
//
// tx_model sends PRBS31 (x^31 + x^28 + 1) as a waveform with half-sine
// transitions one UI wide (amplitude +-1), plus Gaussian voltage noise of
// 0.118, which at the zero crossings equals 0.0375 UI (7.5 ps) of rms
// jitter. Its bit period differs from the receiver's by ppm. Four data
// and four edge slicers (slicer_model) are clocked by the eight phases of
// dpc_model; their outputs are retimed on phase 0, which also clocks
// dcdr_top, and the DPC takes dcdr_top's code.
//
// Segment 1: +300 ppm, 2x integral gain, from reset. After settling, the
// frequency register must be within 6 LSB of -300 * 8 * 512 * 64 * 1e-6 and
// the recovered bit stream must obey the PRBS31 recursion with no error.
// Segment 2: the edge slicers get an offset of 0.3 (a programmed slicer
// offset); the loop must stay error-free.
// Segment 3: sinusoidal jitter of 0.3 UI peak-to-peak at 1 MHz.
// Segment 4: sinusoidal jitter of 2 UI peak-to-peak at 120 kHz.
// Both are below what the loop is expected to tolerate at these
// frequencies; the recovered data must stay error-free (the stream must
// also be balanced, since a constant stream obeys the recursion too).
// The DPC code must wrap at least once.
module tb_cdr_system;
  timeunit 1ps;
  timeprecision 1fs;
  import dcdr_pkg::*;

  localparam int  M = 4, W = 8;
  localparam real UI = 200.0;
  localparam real SIGMA_V = 0.118;

  logic               rst_n = 1'b1;
  real                ppm = 300.0;
  real                vin = 0.0;
  real                off_d = 0.0, off_p = 0.0;
  real                sj_pp = 0.0;      // sinusoidal jitter, UI peak-to-peak
  real                sj_hz = 1.0e6;    // sinusoidal jitter frequency
  logic [2*M-1:0]     ph;
  logic [M-1:0]       dq, eq, data_slice = '0, phase_slice = '0;
  frug_sel_t          frug_sel = FRUG_X2;
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

  dpc_model #(.M(M), .CODE_W(9), .UI_PS(UI)) u_dpc (.code(dpc_code), .ph(ph));

  for (genvar i = 0; i < M; i++) begin : g_slicers
    slicer_model u_edge (.clk(ph[2*i]),   .vin(vin), .offset(off_p), .q(eq[i]));
    slicer_model u_data (.clk(ph[2*i+1]), .vin(vin), .offset(off_d), .q(dq[i]));
  end

  // retime all slicer outputs onto phase 0
  always @(posedge ph[0]) begin
    data_slice  <= dq;
    phase_slice <= eq;
  end

  dcdr_top dut (
    .clk(ph[0]), .rst_n, .data_slice, .phase_slice, .frug_sel, .freq_load,
    .freq_load_val, .data_word, .word_valid, .word_clk, .dpc_code,
    .code_valid, .phe, .dec, .dec_valid, .phase_reg, .freq_reg, .freq_sat
  );

  // --- transmitter
  real sj_t0 = 0.0;
  tx_model #(.UI_PS(UI)) u_tx (
    .ppm(ppm), .sj_pp(sj_pp), .sj_hz(sj_hz), .sj_t0_ps(sj_t0), .sigma_v(SIGMA_V), .vin(vin)
  );

  // --- recovered data: PRBS31 recursion check and statistics
  bit     hist [$];
  bit     measuring = 1'b0;
  int     prbs_checked = 0, prbs_errors = 0, n_wrap = 0, n_ones = 0;
  int     last_code = 0;
  real    freq_sum = 0.0;
  int     freq_n = 0;

  always @(posedge ph[0]) if (rst_n) begin
    if (word_valid) begin
      for (int i = 0; i < W; i++) begin
        hist.push_back(data_word[i]);
        if (hist.size() > 32) void'(hist.pop_front());
        if (measuring && hist.size() == 32) begin
          prbs_checked++;
          if (hist[31] != (hist[0] ^ hist[3])) prbs_errors++;
          if (hist[31]) n_ones++;
        end
      end
      if (measuring) begin
        freq_sum += real'(freq_reg) / 64.0;
        freq_n++;
      end
    end
    if (code_valid) begin
      int d;
      d = int'(dpc_code) - last_code;
      if (d > 255 || d < -256) n_wrap++;
      last_code = int'(dpc_code);
    end
  end

  task automatic words(int n);
    repeat (n * (W / M)) @(posedge ph[0]);
  endtask

  task automatic expect_clean(string name);
    checks++;
    $display("%s: %0d bits checked, %0d PRBS errors, %0d ones", name, prbs_checked,
             prbs_errors, n_ones);
    // a constant stream would satisfy the recursion too: require balance
    if (prbs_checked < 1000 || prbs_errors != 0 ||
        n_ones * 10 < prbs_checked * 4 || n_ones * 10 > prbs_checked * 6) begin
      failures++;
      $display("FAIL %s: recovered data", name);
    end
  endtask

  initial begin
    real exp_f, got_f;
    #1 rst_n = 1'b0;
    #2000 rst_n = 1'b1;

    // segment 1
    words(12000);
    measuring = 1'b1; prbs_checked = 0; prbs_errors = 0; n_ones = 0; freq_sum = 0.0; freq_n = 0;
    words(3000);
    measuring = 1'b0;
    expect_clean("segment 1");
    exp_f = -ppm * 8.0 * 512.0 * 64.0 * 1.0e-6;
    got_f = freq_sum / real'(freq_n);
    $display("segment 1: frequency word %0.2f, expected %0.2f", got_f, exp_f);
    checks++;
    if (got_f - exp_f > 6.0 || exp_f - got_f > 6.0) begin
      failures++;
      $display("FAIL segment 1: frequency word");
    end

    // segment 2: programmed offset on the edge slicers
    off_p = 0.3;
    words(3000);
    measuring = 1'b1; prbs_checked = 0; prbs_errors = 0; n_ones = 0;
    words(3000);
    measuring = 1'b0;
    expect_clean("segment 2");
    off_p = 0.0;

    // segment 3: 0.3 UI pk-pk sinusoidal jitter at 1 MHz, four periods
    sj_hz = 1.0e6; sj_pp = 0.3; sj_t0 = $realtime;
    words(1250);
    measuring = 1'b1; prbs_checked = 0; prbs_errors = 0; n_ones = 0;
    words(1250);
    measuring = 1'b0;
    expect_clean("segment 3");

    // segment 4: 2 UI pk-pk sinusoidal jitter at 120 kHz, two periods
    sj_pp = 0.0;
    words(500);
    sj_hz = 1.2e5; sj_pp = 2.0; sj_t0 = $realtime;
    words(5200);
    measuring = 1'b1; prbs_checked = 0; prbs_errors = 0; n_ones = 0;
    words(5200);
    measuring = 1'b0;
    expect_clean("segment 4");
    sj_pp = 0.0;

    checks++;
    $display("DPC code wraps: %0d", n_wrap);
    if (n_wrap == 0) begin
      failures++;
      $display("FAIL the DPC code never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(UI * 8.0 * 50000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

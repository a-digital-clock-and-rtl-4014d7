// tb_dcdr_top: closed-loop test of the digital CDR at its default sizes.
//
// The testbench stands in for everything outside the digital loop: a PRBS31
// transmitter with a frequency offset and random (roughly Gaussian) edge
// jitter of 0.0375 UI rms, the slicers, and a DPC with infinite range that
// moves every sampling instant by -1/512 UI per code step (a wrap of the
// 9-bit code is taken as the short step). It works one slicer clock at a
// time: each clock samples M = 4 data bits at the bit centres and 4 edge
// samples half a UI earlier, at the sampling phase set by the DPC code of
// ANA_DLY clocks ago. With the 5 clocks inside the design and the 2 the
// deserializer needs to collect a word, the loop delay is 36 slicer clocks,
// 18 words.
//
// Phases of the test:
//   A  +500 ppm, 4x integral gain: acquire lock and track
//   A2 +900 ppm (a step from A, without reset), close to the ~972 ppm the frequency register can reach
//   B  -300 ppm, 1x integral gain (a gain switch and a frequency step)
//   C  +100 ppm, 2x integral gain
//   D  0 ppm, integral gain off (slower sampling offset expected as the
//      loaded value grows), frequency register loaded with fixed
//      values: the decimator output must settle to cancel it, the
//      measurement of the phase-detector-plus-decimator gain
//   E  +1500 ppm, beyond the ~972 ppm range, with the frequency register
//      loaded next to its negative limit: it must saturate there instead
//      of rolling over to large positive values
// A, B and C start from reset. In A-C the sampling phase error must stay within 0.2 UI after settling
// and the frequency register must settle at -ppm * 8 * 512 * 64 * 1e-6
// within 6 frequency LSBs (3.8 ppm each). The recovered data words are
// compared with the samples the slicers produced. Each mechanism (early,
// late and no-transition decisions, decimator values +-2, phase integrator
// wrap, gain settings, frequency load and saturation) must occur.
module tb_dcdr_top;
  import dcdr_pkg::*;

  localparam int    M = 4, W = 8;
  localparam int    ANA_DLY = 29;
  localparam real   SIGMA_J = 0.0375;   // 7.5 ps of 200 ps

  logic               clk = 1'b0, rst_n = 1'b1;
  logic [M-1:0]       data_slice = '0, phase_slice = '0;
  frug_sel_t          frug_sel = FRUG_X4;
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

  dcdr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // --- transmitter: PRBS31 (x^31 + x^28 + 1), random access by bit index
  logic [30:0] lfsr = 31'h1234_5678;
  logic        tx_bits [4096];
  longint      tx_next = 0;
  function automatic logic tx_bit(longint k);
    while (tx_next <= k) begin
      logic nb;
      nb = lfsr[30] ^ lfsr[27];
      lfsr = {lfsr[29:0], nb};
      tx_bits[12'(tx_next)] = nb;
      tx_next++;
    end
    return tx_bits[12'(k)];
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 1000000)) / 1.0e6 - 0.5;
    return s / 0.57735;
  endfunction

  // --- channel and receiver state
  real    ppm = 0.0;
  real    phi_in = 0.0;      // data phase, UI
  real    s_rx = 0.0;        // sampling phase, UI (unwrapped)
  longint slot = 0;          // receiver bit slot index
  int     code_q [$];        // DPC code delay line
  int     code_applied = 0;
  logic [M-1:0] d_hist [$];  // data slices sent, for the data check

  // --- coverage counters
  int n_early = 0, n_late = 0, n_none = 0, n_dec_p2 = 0, n_dec_m2 = 0;
  int n_wrap = 0, n_sat = 0, n_load = 0, n_words = 0;
  int n_x1 = 0, n_x2 = 0, n_x4 = 0, n_off = 0;
  int last_code = 0;

  // --- per-window statistics
  real err_max, freq_sum, dec_sum;
  int  win_n, dec_n;

  function automatic real wrap_ui(real x);
    real y;
    y = x - $floor(x + 0.5);
    return y;
  endfunction

  // One slicer clock of the channel model.
  task automatic slicer_clock();
    int diff, c;
    @(negedge clk);
    // DPC: apply the code of ANA_DLY clocks ago
    code_q.push_back(int'(dpc_code));
    if (code_q.size() > ANA_DLY) begin
      c = code_q.pop_front();
      diff = c - code_applied;
      if (diff > 255)  diff -= 512;
      if (diff < -256) diff += 512;
      s_rx -= real'(diff) / 512.0;
      code_applied = c;
    end
    for (int i = 0; i < M; i++) begin
      real te, td;
      longint ke, kd;
      te = real'(slot + longint'(i)) + s_rx + SIGMA_J * gauss();
      td = real'(slot + longint'(i)) + 0.5 + s_rx + SIGMA_J * gauss();
      ke = longint'($floor(te - phi_in)) + 64;
      kd = longint'($floor(td - phi_in)) + 64;
      phase_slice[i] = tx_bit(ke);
      data_slice[i]  = tx_bit(kd);
    end
    d_hist.push_back(data_slice);
    slot += longint'(M);
    phi_in += real'(M) * ppm * 1.0e-6;
  endtask

  // Observation at every clock edge.
  always @(posedge clk) if (rst_n) begin
    if (word_valid) begin
      n_words++;
      // data_word was registered at the previous edge, from the two
      // slices driven before that edge
      if (d_hist.size() >= 3) begin
        checks++;
        if (data_word != {d_hist[d_hist.size()-2], d_hist[d_hist.size()-3]}) begin
          failures++;
          $display("FAIL data_word %h at %0t", data_word, $time);
        end
      end
      case (frug_sel)
        FRUG_X1: n_x1++;
        FRUG_X2: n_x2++;
        FRUG_X4: n_x4++;
        default: n_off++;
      endcase
    end
    if (d_hist.size() > 8) void'(d_hist.pop_front());
    if (dec_valid) begin
      if (dec == 3'sd2)  n_dec_p2++;
      if (dec == -3'sd2) n_dec_m2++;
      dec_sum += real'(dec);
      dec_n++;
    end
    if (code_valid) begin
      int d;
      d = int'(dpc_code) - last_code;
      if (d > 255 || d < -256) n_wrap++;
      last_code = int'(dpc_code);
    end
    if (freq_sat) n_sat++;
    if (freq_load) n_load++;
  end

  always @(posedge clk) if (rst_n && code_valid) begin
    for (int i = 0; i < W; i++) begin
      if (phe[i] == PHE_EARLY) n_early++;
      else if (phe[i] == PHE_LATE) n_late++;
      else n_none++;
    end
  end

  // Run a number of words; statistics over the last `meas` of them.
  task automatic run(int words, int meas);
    for (int w = 0; w < words; w++) begin
      if (w == words - meas) begin
        err_max = 0.0; freq_sum = 0.0; win_n = 0; dec_sum = 0.0; dec_n = 0;
      end
      repeat (W / M) slicer_clock();
      if (w >= words - meas) begin
        real e;
        e = wrap_ui(s_rx - phi_in);
        if (e < 0) e = -e;
        if (e > err_max) err_max = e;
        freq_sum += real'(freq_reg) / 64.0;
        win_n++;
      end
    end
  endtask

  task automatic track_phase(string name, real p, frug_sel_t g, int words, bit from_reset);
    real exp_f, got_f;
    // acquire from reset, as after power-up, or carry on from the last state
    if (from_reset) begin
      rst_n = 1'b0;
      slicer_clock();
      rst_n = 1'b1;
      d_hist.delete();
    end
    ppm = p;
    frug_sel = g;
    run(words, 4000);
    exp_f = -p * 8.0 * 512.0 * 64.0 * 1.0e-6;
    got_f = freq_sum / real'(win_n);
    $display("%s: ppm=%0.1f max |phase error|=%0.3f UI, freq word %0.2f (expected %0.2f)",
             name, p, err_max, got_f, exp_f);
    checks += 2;
    if (err_max > 0.2) begin
      failures++;
      $display("FAIL %s: phase error %0.3f UI", name, err_max);
    end
    if (got_f - exp_f > 6.0 || exp_f - got_f > 6.0) begin
      failures++;
      $display("FAIL %s: frequency word %0.2f expected %0.2f", name, got_f, exp_f);
    end
  endtask

  task automatic load_freq(int v);
    freq_load = 1'b1;
    freq_load_val = 15'(v);
    slicer_clock();
    freq_load = 1'b0;
  endtask

  initial begin
    real mean_e_prev;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);

    track_phase("A", 500.0, FRUG_X4, 30000, 1);
    track_phase("A2", 900.0, FRUG_X4, 20000, 0);
    track_phase("B", -300.0, FRUG_X1, 60000, 1);
    track_phase("C", 100.0, FRUG_X2, 40000, 1);

    // D: gain measurement with the integral path off
    ppm = 0.0;
    frug_sel = FRUG_OFF;
    mean_e_prev = 1.0;
    for (int v = 4; v <= 12; v += 4) begin
      real mean_dec, mean_e;
      int  n;
      load_freq(v * 64);
      run(3000, 3000);
      mean_dec = dec_sum / real'(dec_n);
      // mean sampling offset over a separate short window
      mean_e = 0.0; n = 0;
      for (int w = 0; w < 2000; w++) begin
        repeat (W / M) slicer_clock();
        mean_e += wrap_ui(s_rx - phi_in);
        n++;
      end
      mean_e /= real'(n);
      $display("D: freq top %0d -> mean decimator output %0.3f (expected %0.3f), mean phase offset %0.4f UI",
               v, mean_dec, -real'(v) / 8.0, mean_e);
      checks += 2;
      if (mean_dec + real'(v) / 8.0 > 0.05 || mean_dec + real'(v) / 8.0 < -0.05) begin
        failures++;
        $display("FAIL D: mean decimator output");
      end
      // a larger programmed frequency pulls the sampling phase further
      if (!(mean_e < mean_e_prev)) begin
        failures++;
        $display("FAIL D: phase offset not monotonic");
      end
      mean_e_prev = mean_e;
    end

    // E: beyond the trackable range, starting next to the negative limit;
    // the register must stay pinned near the limit, never roll over
    load_freq(-16380);
    ppm = 1500.0;
    frug_sel = FRUG_X4;
    for (int w = 0; w < 5000; w++) begin
      repeat (W / M) slicer_clock();
      if (freq_reg > -15'sd15000) begin
        checks++;
        failures++;
        $display("FAIL E: frequency register %0d left the limit", freq_reg);
        break;
      end
    end

    // every mechanism must have occurred
    checks++;
    $display("coverage: early=%0d late=%0d none=%0d dec+2=%0d dec-2=%0d wrap=%0d sat=%0d load=%0d x1=%0d x2=%0d x4=%0d off=%0d words=%0d",
             n_early, n_late, n_none, n_dec_p2, n_dec_m2, n_wrap, n_sat, n_load,
             n_x1, n_x2, n_x4, n_off, n_words);
    if (n_early == 0 || n_late == 0 || n_none == 0 || n_dec_p2 == 0 || n_dec_m2 == 0 ||
        n_wrap == 0 || n_sat == 0 || n_load == 0 || n_x1 == 0 || n_x2 == 0 ||
        n_x4 == 0 || n_off == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

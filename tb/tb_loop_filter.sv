// tb_loop_filter: drives random decimated errors, gain selections and
// frequency-register loads into the loop filter and compares the phase
// register, frequency register, saturation flag and DPC code with an
// integer model of the update rules:
//   freq  <- clamp(freq + err * {0,1,2,4}, -2^14, 2^14 - 1)
//   phase <- (phase + 8 * err + (freq >>> 6)) mod 2^15
//   code  <- phase >> 6, one clock after the phase update.
// Directed parts check the proportional step (one err of +1 moves the
// phase by 8 = 2^-3 DPC code), saturation at both ends and phase wrap.
module tb_loop_filter;
  import dcdr_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               en = 1'b0;
  dec_t               err = '0;
  frug_sel_t          frug_sel = FRUG_OFF;
  logic               freq_load = 1'b0;
  logic signed [14:0] freq_load_val = '0;
  logic [14:0]        phase_reg;
  logic signed [14:0] freq_reg;
  logic [8:0]         dpc_code;
  logic               code_valid;
  logic               freq_sat;

  int checks = 0, failures = 0;
  int ref_p = 0, ref_f = 0, ref_code = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_wrap = 0, n_load = 0;
  int pend_code = -1;

  loop_filter dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // One clock: apply inputs, update the model, check after the edge.
  task automatic step(bit e, int ev, frug_sel_t g, bit ld, int ldv);
    int gain, fs, pn, fn;
    bit sat;
    @(negedge clk);
    en = e; err = dec_t'(ev); frug_sel = g; freq_load = ld;
    freq_load_val = 15'(ldv);
    gain = (g == FRUG_X1) ? 1 : (g == FRUG_X2) ? 2 : (g == FRUG_X4) ? 4 : 0;
    fn = ref_f; pn = ref_p; sat = 0;
    if (e) begin
      pn = (ref_p + 8 * ev + (ref_f >>> 6)) & 32'h7fff;
      if (ref_p + 8 * ev + (ref_f >>> 6) > 32767 || ref_p + 8 * ev + (ref_f >>> 6) < 0) n_wrap++;
      fs = ref_f + ev * gain;
      fn = fs;
      if (fs > 16383)  begin fn = 16383;  sat = 1; n_sat_hi++; end
      if (fs < -16384) begin fn = -16384; sat = 1; n_sat_lo++; end
    end
    if (ld) begin fn = ldv; sat = 0; n_load++; end
    @(posedge clk);
    #1;
    if (pend_code >= 0) begin
      check("code_valid", int'(code_valid), 1);
      check("dpc_code", int'(dpc_code), pend_code);
    end else begin
      check("code_valid", int'(code_valid), 0);
    end
    pend_code = e ? (pn >> 6) : -1;
    ref_p = pn; ref_f = fn;
    check("phase_reg", int'(phase_reg), ref_p);
    check("freq_reg", int'(freq_reg), ref_f);
    if (e) check("freq_sat", int'(freq_sat), int'(sat && !ld));
  endtask

  initial begin
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // proportional step: +1 moves the phase by 8
    step(1, 1, FRUG_OFF, 0, 0);
    check("phug step", int'(phase_reg), 8);
    step(0, 0, FRUG_OFF, 0, 0);
    step(1, -2, FRUG_OFF, 0, 0);
    check("phug step", int'(phase_reg), 32768 - 8);
    // random operation
    for (int t = 0; t < 20000; t++) begin
      int r;
      frug_sel_t g;
      r = $urandom_range(0, 99);
      g = frug_sel_t'($urandom_range(0, 3));
      if (r < 2)      step(1, $urandom_range(0, 4) - 2, g, 1, int'($urandom_range(0, 32767)) - 16384);
      else if (r < 20) step(0, 0, g, 0, 0);
      else            step(1, $urandom_range(0, 4) - 2, g, 0, 0);
    end
    // saturation at the top and the bottom
    step(1, 0, FRUG_X4, 1, 16370);
    repeat (10) step(1, 2, FRUG_X4, 0, 0);
    check("freq at max", int'(freq_reg), 16383);
    step(1, 0, FRUG_X4, 1, -16370);
    repeat (10) step(1, -2, FRUG_X4, 0, 0);
    check("freq at min", int'(freq_reg), -16384);
    step(0, 0, FRUG_OFF, 0, 0);
    step(0, 0, FRUG_OFF, 0, 0);
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_wrap == 0 || n_load == 0) begin
      failures++;
      $display("FAIL coverage sat_hi=%0d sat_lo=%0d wrap=%0d load=%0d",
               n_sat_hi, n_sat_lo, n_wrap, n_load);
    end
    $display("coverage: sat_hi=%0d sat_lo=%0d wrap=%0d load=%0d", n_sat_hi, n_sat_lo, n_wrap, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bbpd: exhaustive check of the bang-bang phase detector against its
// decision table, written out row by row in data-symbol form (+1/-1).
module tb_bbpd;
  import dcdr_pkg::*;

  logic d_prev, p, d_cur;
  phe_t phe;
  int   checks = 0, failures = 0;

  bbpd dut (.d_prev(d_prev), .p(p), .d_cur(d_cur), .phe(phe));

  // Decision table: symbols d[n-1], p[n], d[n] -> decision.
  function automatic int expected(int dp, int pp, int dc);
    if (dp == -1 && pp == -1 && dc ==  1) return -1;  // early
    if (dp ==  1 && pp ==  1 && dc == -1) return -1;  // early
    if (dp == -1 && pp ==  1 && dc ==  1) return  1;  // late
    if (dp ==  1 && pp == -1 && dc == -1) return  1;  // late
    return 0;                                         // no transition
  endfunction

  function automatic int sym(logic b);
    return b ? 1 : -1;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      {d_prev, p, d_cur} = 3'(i);
      #1;
      checks++;
      if (int'(phe) != expected(sym(d_prev), sym(p), sym(d_cur))) begin
        failures++;
        $display("FAIL d_prev=%0b p=%0b d_cur=%0b phe=%0d", d_prev, p, d_cur, phe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

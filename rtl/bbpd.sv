// bbpd: one bang-bang phase detector.
//
// It looks at the data bit before an edge sample (d_prev), the edge sample
// itself (p) and the data bit after it (d_cur). Without a data transition
// there is no decision (0). With a transition, an edge sample equal to the
// earlier data bit means the sampling phase is early (-1), and one equal to
// the later data bit means it is late (+1). This is the decision table of
// the architecture; the 2-bit signed output encoding is this design's
// choice (see dcdr_pkg). Purely combinational.
module bbpd
  import dcdr_pkg::*;
(
  input  logic d_prev,  // data sample d[n-1]
  input  logic p,       // edge (phase) sample p[n], between d[n-1] and d[n]
  input  logic d_cur,   // data sample d[n]
  output phe_t phe      // -1 early, 0 none, +1 late
);

  always_comb begin
    if (d_prev == d_cur)  phe = PHE_NONE;
    else if (p == d_prev) phe = PHE_EARLY;
    else                  phe = PHE_LATE;
  end

endmodule
